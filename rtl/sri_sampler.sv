// sri_sampler: the scaled-RAM interpolator's control. It takes feature points
// from the queue once the scaled RAM of their rounded scale s0 holds every row
// their samples can reach (or the frame is complete), and for each point
//  1. streams the 109 orientation samples (i, j integers, i*i + j*j < 36, at
//     spacing s around the point), Gaussian-weighted with sigma = 2.5 s, to
//     the orientation generator, then waits for the orientation;
//  2. streams the 20x20 descriptor samples at offsets ((k - 9.5) s) in the
//     frame rotated by the orientation, Gaussian-weighted with sigma = 3.3 s,
//     with their responses turned into that frame, to the descriptor
//     generator; then starts normalisation.
// Every sample position p (pixels, 16-bit fraction) is mapped to the scaled
// grid of s0 as (p + 0.5) / s0; its integer part addresses the four stored
// neighbours and its fraction drives the bilinear interpolator (CI3), so
// sample points keep sub-pixel positions although the stored wavelets sit on
// integer grid points. One sample per clock, one clock of pipeline.
// Interfaces: feature-point queue (valid / pop), scaled-RAM read (rd_sidx,
// rd_x, rd_y -> rd_q), orientation and descriptor generator ports, norm
// start / done. Interpolated Haar responses, fixed-point positions and
// serving each point from the RAM of its rounded scale follow the design;
// sample counts and Gaussian widths follow SURF; the schedule is this
// implementation's choice.
module sri_sampler
  import surf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // feature-point queue
  input  logic                    fp_valid,
  input  fp_t                     fp_in,
  output logic                    fp_pop,
  input  logic [11:0]             rows_done [NSCALE],
  input  logic                    frame_all,
  // scaled RAM read
  output logic [1:0]              rd_sidx,
  output logic signed [12:0]      rd_x,
  output logic signed [12:0]      rd_y,
  input  haar_t                   rd_q [4],
  // orientation generator
  output logic                    og_clear,
  output logic                    og_valid,
  output logic signed [ACC_W-1:0] og_dx,
  output logic signed [ACC_W-1:0] og_dy,
  output logic                    og_finish,
  input  logic                    og_done,
  input  logic signed [31:0]      og_cos,
  input  logic signed [31:0]      og_sin,
  // descriptor generator and normaliser
  output logic                    dg_clear,
  output logic                    dg_valid,
  output logic [4:0]              dg_ku,
  output logic [4:0]              dg_kv,
  output logic signed [ACC_W-1:0] dg_rx,
  output logic signed [ACC_W-1:0] dg_ry,
  output logic                    norm_start,
  input  logic                    norm_done,
  output fp_t                     cur_fp,
  output logic                    busy,
  output logic                    frac_seen     // a sample fell between grid points
);
  // Gaussian tables, Q16: g25(n) = exp(-n^2 / (2 * 2.5^2)), g33(k) = exp(-(k+0.5)^2 / (2 * 3.3^2))
  function automatic logic [16:0] g25(input int n);
    case (n)
      0: return 17'd65535; 1: return 17'd60496; 2: return 17'd47588; 3: return 17'd31899;
      4: return 17'd18221; 5: return 17'd8869;  default: return 17'd3679;
    endcase
  endfunction
  function automatic logic [16:0] g33(input int k);
    case (k)
      0: return 17'd64787; 1: return 17'd59103; 2: return 17'd49187; 3: return 17'd37343;
      4: return 17'd25863; 5: return 17'd16341; 6: return 17'd9419;  7: return 17'd4953;
      8: return 17'd2376;  default: return 17'd1040;
    endcase
  endfunction
  function automatic logic [31:0] inv_s0(input logic [2:0] s);   // 2^24 / s0
    case (s)
      3'd2: return 32'd8388608; 3'd3: return 32'd5592405;
      3'd4: return 32'd4194304; default: return 32'd3355443;
    endcase
  endfunction

  typedef enum logic [2:0] {P_IDLE, P_OG, P_OGWAIT, P_DG, P_DGEND, P_NORM} pst_t;
  pst_t st;
  logic [31:0] s_q, inv_q;
  logic [2:0]  s0;
  logic signed [4:0] gi, gj;       // orientation sample offsets
  logic [4:0]  ku, kv;             // descriptor sample indices
  logic signed [31:0] cs, sn;      // orientation cos / sin, Q16

  // ---- sample generation (stage 0) ----
  logic gen_valid, gen_last;
  logic signed [63:0] px, py;      // pixel position, Q16
  logic [32:0] gen_w;              // weight, Q16
  always_comb begin
    logic signed [63:0] u2, v2, ru, rv, xs, ys;
    xs = $signed({52'd0, cur_fp.x}); ys = $signed({52'd0, cur_fp.y});
    gen_valid = 1'b0; gen_last = 1'b0; px = '0; py = '0; gen_w = '0;
    u2 = 64'(2 * int'(ku) - 19); v2 = 64'(2 * int'(kv) - 19);
    ru = '0; rv = '0;
    if (st == P_OG) begin
      gen_valid = (int'(gi) * int'(gi) + int'(gj) * int'(gj)) < 36;
      gen_last  = (gi == 5'sd6) && (gj == 5'sd6);
      px = (xs <<< 16) + 64'(gi) * $signed({32'd0, s_q});
      py = (ys <<< 16) + 64'(gj) * $signed({32'd0, s_q});
      gen_w = 33'((34'(g25((gi < 0) ? -int'(gi) : int'(gi))) * 34'(g25((gj < 0) ? -int'(gj) : int'(gj)))) >> 16);
    end else if (st == P_DG) begin
      gen_valid = 1'b1;
      gen_last  = (ku == 5'd19) && (kv == 5'd19);
      ru = u2 * 64'(cs) - v2 * 64'(sn);             // Q16, in half sample units
      rv = u2 * 64'(sn) + v2 * 64'(cs);
      px = (xs <<< 16) + ((ru * $signed({32'd0, s_q})) >>> 17);
      py = (ys <<< 16) + ((rv * $signed({32'd0, s_q})) >>> 17);
      gen_w = 33'((34'(g33(((ku >= 10) ? int'(ku) - 10 : 9 - int'(ku)))) *
                   34'(g33(((kv >= 10) ? int'(kv) - 10 : 9 - int'(kv))))) >> 16);
    end
  end

  // map to the scaled grid: (p + 0.5) / s0
  logic signed [63:0] gxq, gyq;
  assign gxq = ((px + 64'sd32768) * $signed({32'd0, inv_q})) >>> 24;
  assign gyq = ((py + 64'sd32768) * $signed({32'd0, inv_q})) >>> 24;

  // ---- stage 1: scaled RAM read and interpolation ----
  logic        s1_valid, s1_og, s1_last;
  logic [15:0] s1_fx, s1_fy;
  logic [32:0] s1_w;
  logic [4:0]  s1_ku, s1_kv;
  logic signed [IVAL_W-1:0] idx_v, idy_v;

  ci3_interp u_interp (.q(rd_q), .fx(s1_fx), .fy(s1_fy), .dx(idx_v), .dy(idy_v));

  assign rd_sidx = 2'(s0 - 3'd2);

  // weighted and, for the descriptor, rotated responses
  always_comb begin
    logic signed [63:0] wx, wy, rx, ry;
    wx = (64'(idx_v) * $signed({31'd0, s1_w})) >>> 16;
    wy = (64'(idy_v) * $signed({31'd0, s1_w})) >>> 16;
    rx = (wx * 64'(cs) + wy * 64'(sn)) >>> 16;
    ry = (wy * 64'(cs) - wx * 64'(sn)) >>> 16;
    og_dx = ACC_W'(wx); og_dy = ACC_W'(wy);
    dg_rx = ACC_W'(rx); dg_ry = ACC_W'(ry);
  end
  assign og_valid = s1_valid && s1_og;
  assign dg_valid = s1_valid && !s1_og;
  assign dg_ku    = s1_ku;
  assign dg_kv    = s1_kv;
  assign busy     = (st != P_IDLE);

  // ready test: the RAM of s0 holds the rows down to y + 16 s + 2 s0 + 2
  logic fp_ready;
  always_comb begin
    logic [2:0]  hs0;
    logic [31:0] need;
    hs0  = scale_s0(fp_in.fsize);
    need = 32'(fp_in.y) + ((32'd16 * scale_q16(fp_in.fsize)) >> 16) + 32'(2 * hs0) + 32'd2;
    fp_ready = frame_all || (32'(rows_done[2'(hs0 - 3'd2)]) * 32'(hs0) >= need);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; s_q <= '0; inv_q <= '0; s0 <= 3'd2; gi <= '0; gj <= '0; ku <= '0; kv <= '0;
      cs <= 32'sd65536; sn <= '0; cur_fp <= '0; fp_pop <= 1'b0;
      og_clear <= 1'b0; og_finish <= 1'b0; dg_clear <= 1'b0; norm_start <= 1'b0;
      rd_x <= '0; rd_y <= '0; s1_valid <= 1'b0; s1_og <= 1'b0; s1_last <= 1'b0;
      s1_fx <= '0; s1_fy <= '0; s1_w <= '0; s1_ku <= '0; s1_kv <= '0; frac_seen <= 1'b0;
    end else begin
      fp_pop <= 1'b0; og_clear <= 1'b0; og_finish <= 1'b0; dg_clear <= 1'b0; norm_start <= 1'b0;
      // pipeline register
      s1_valid <= gen_valid;
      s1_og    <= (st == P_OG);
      s1_last  <= gen_last;
      rd_x     <= 13'(gxq >>> 16);
      rd_y     <= 13'(gyq >>> 16);
      s1_fx    <= gxq[15:0];
      s1_fy    <= gyq[15:0];
      s1_w     <= gen_w;
      s1_ku    <= ku;
      s1_kv    <= kv;
      if (gen_valid && (gxq[15:0] != 0 || gyq[15:0] != 0)) frac_seen <= 1'b1;
      case (st)
        P_IDLE: if (fp_valid && fp_ready && !fp_pop) begin
          cur_fp <= fp_in; fp_pop <= 1'b1;
          s_q <= scale_q16(fp_in.fsize);
          s0 <= scale_s0(fp_in.fsize);
          inv_q <= inv_s0(scale_s0(fp_in.fsize));
          gi <= -5'sd6; gj <= -5'sd6;
          og_clear <= 1'b1; dg_clear <= 1'b1;
          st <= P_OG;
        end
        P_OG: begin
          if (gi == 5'sd6) begin
            gi <= -5'sd6;
            if (gj == 5'sd6) st <= P_OGWAIT;
            else gj <= gj + 5'sd1;
          end else gi <= gi + 5'sd1;
        end
        P_OGWAIT: begin
          if (s1_last && s1_og) og_finish <= 1'b1;
          if (og_done) begin
            cs <= og_cos; sn <= og_sin; ku <= '0; kv <= '0; st <= P_DG;
          end
        end
        P_DG: begin
          if (ku == 5'd19) begin
            ku <= '0;
            if (kv == 5'd19) st <= P_DGEND;
            else kv <= kv + 1'b1;
          end else ku <= ku + 1'b1;
        end
        P_DGEND: if (!s1_valid) begin norm_start <= 1'b1; st <= P_NORM; end
        P_NORM: if (norm_done) st <= P_IDLE;
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
