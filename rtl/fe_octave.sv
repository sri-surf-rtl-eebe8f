// fe_octave: feature detection for one octave. For the centre row 'row_y'
// (a multiple of STEP) it computes, at every STEP-th column, the normalised
// determinant of the approximated Hessian for the four box-filter sizes
// L0..L3 of the octave, det = Dxx*Dyy - (0.9*Dxy)^2 with each D divided by
// the filter area L*L. Each D is built from box sums of the integral image,
// one box (four corners, four read ports) per clock: two boxes for Dxx, two
// for Dyy, four for Dxy. Three determinant rows per filter size are kept;
// after each new row the previous one is searched for local maxima over the
// 3x3x3 neighbourhood (space and scale) at the two middle filter sizes, and
// every maximum above 'threshold' is sent out as a feature point. A point is
// dropped (with a 'fp_drop' pulse) when the feature-point queue is full.
// Timing: 32 clocks per grid point for the determinants, then 2 clocks per
// grid point for the search. The determinant, the local-maximum search and
// the two-octave structure follow SURF as the design uses it; the box
// geometry follows the usual OpenSURF layout; the sequential schedule,
// the reciprocal multiply used for the normalising divide and the missing
// sub-pixel refinement are this implementation's.
module fe_octave
  import surf_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080,
  parameter int STEP  = 2,
  parameter int L0    = 9,
  parameter int L1    = 15,
  parameter int L2    = 21,
  parameter int L3    = 27
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [11:0]             row_y,
  input  logic signed [ACC_W-1:0] threshold,
  output logic                    busy,
  output logic signed [12:0]      rd_row [4],
  output logic signed [12:0]      rd_col [4],
  input  logic [II_W-1:0]         rd_data [4],
  output logic                    fp_valid,
  output fp_t                     fp,
  input  logic                    fp_full,
  output logic                    fp_drop
);
  localparam int NG   = IMG_W / STEP;
  localparam int BMAX = (L3 - 1) / 2;
  localparam int M    = BMAX + STEP;     // border kept free of detections

  function automatic int lsz(input int i);
    case (i)
      0: return L0;
      1: return L1;
      2: return L2;
      default: return L3;
    endcase
  endfunction
  function automatic logic [31:0] inv_area(input int i);   // 2^32 / L^2
    return 32'((64'd1 << 32) / 64'(lsz(i) * lsz(i)));
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_DET, S_NMS} state_t;
  state_t st;
  logic [11:0] y_q, gx;
  logic [1:0]  sz;
  logic [2:0]  bx;
  logic [11:0] rows_q;    // determinant rows computed this frame
  logic signed [ACC_W-1:0] det [3][4][NG];
  logic signed [31:0] dxx, dyy, dxy;
  logic nms_sc;           // 0: L1, 1: L2

  // current box geometry
  logic signed [12:0] b0r, b0c, bnr, bnc;
  logic signed [31:0] bsum;
  always_comb begin
    int l, b, r, c;
    l = lsz(int'(sz)) / 3; b = (lsz(int'(sz)) - 1) / 2;
    r = int'(y_q); c = int'(gx) * STEP;
    b0r = '0; b0c = '0; bnr = 13'sd1; bnc = 13'sd1;
    case (bx)
      3'd0: begin b0r = 13'(r-l+1);   b0c = 13'(c-b);     bnr = 13'(2*l-1); bnc = 13'(lsz(int'(sz))); end
      3'd1: begin b0r = 13'(r-l+1);   b0c = 13'(c-l/2);   bnr = 13'(2*l-1); bnc = 13'(l);         end
      3'd2: begin b0r = 13'(r-b);     b0c = 13'(c-l+1);   bnr = 13'(lsz(int'(sz))); bnc = 13'(2*l-1); end
      3'd3: begin b0r = 13'(r-l/2);   b0c = 13'(c-l+1);   bnr = 13'(l);     bnc = 13'(2*l-1); end
      3'd4: begin b0r = 13'(r-l);     b0c = 13'(c+1);     bnr = 13'(l);     bnc = 13'(l);     end
      3'd5: begin b0r = 13'(r+1);     b0c = 13'(c-l);     bnr = 13'(l);     bnc = 13'(l);     end
      3'd6: begin b0r = 13'(r-l);     b0c = 13'(c-l);     bnr = 13'(l);     bnc = 13'(l);     end
      default: begin b0r = 13'(r+1);  b0c = 13'(c+1);     bnr = 13'(l);     bnc = 13'(l);     end
    endcase
    // corners: 0 (r1,c1) 1 (r0-1,c1) 2 (r1,c0-1) 3 (r0-1,c0-1)
    rd_row[0] = b0r + bnr - 13'sd1; rd_col[0] = b0c + bnc - 13'sd1;
    rd_row[1] = b0r - 13'sd1;       rd_col[1] = b0c + bnc - 13'sd1;
    rd_row[2] = b0r + bnr - 13'sd1; rd_col[2] = b0c - 13'sd1;
    rd_row[3] = b0r - 13'sd1;       rd_col[3] = b0c - 13'sd1;
    bsum = $signed(rd_data[0]) - $signed(rd_data[1]) - $signed(rd_data[2]) + $signed(rd_data[3]);
  end

  // normalised determinant of the completed filter size
  logic signed [31:0] dxy_fin;
  logic signed [ACC_W-1:0] det_new;
  always_comb begin
    logic signed [63:0] nxx, nyy, nxy, inv;
    dxy_fin = dxy - bsum;                   // box 7 enters with weight -1
    inv = 64'(inv_area(int'(sz)));
    nxx = (64'(dxx) * inv) >>> 24;          // Q8
    nyy = (64'(dyy) * inv) >>> 24;
    nxy = (64'(dxy_fin) * inv) >>> 24;
    det_new = ACC_W'(nxx * nyy - ((nxy * nxy * 64'sd53084) >>> 16));   // Q16, 0.81 = 53084/2^16
  end

  // 3x3x3 local maximum test on the middle row
  logic [1:0] s_mid_slot, s_top_slot, s_bot_slot;
  logic is_max;
  logic signed [ACC_W-1:0] centre;
  always_comb begin
    int sc;
    s_top_slot = 2'((32'(rows_q) + 1) % 3);   // row k-2
    s_mid_slot = 2'((32'(rows_q) + 2) % 3);   // row k-1
    s_bot_slot = 2'(32'(rows_q) % 3);         // row k
    sc = nms_sc ? 2 : 1;
    centre = det[s_mid_slot][sc][gx];
    is_max = (centre > threshold);
    for (int ds = -1; ds <= 1; ds++)
      for (int dr = 0; dr < 3; dr++)
        for (int dc = -1; dc <= 1; dc++) begin
          logic [1:0] sl;
          sl = (dr == 0) ? s_top_slot : (dr == 1) ? s_mid_slot : s_bot_slot;
          if (!(ds == 0 && dr == 1 && dc == 0))
            if (det[sl][sc+ds][int'(gx)+dc] >= centre) is_max = 1'b0;
        end
  end

  logic [11:0] ym;
  assign ym = y_q - 12'(STEP);
  logic nms_ok_row, nms_ok_col;
  assign nms_ok_row = (rows_q >= 12'd2) && (ym >= 12'(M)) && (32'(ym) < IMG_H - M);
  assign nms_ok_col = (32'(gx) * STEP >= M) && (32'(gx) * STEP < IMG_W - M) && (gx >= 1) && (32'(gx) < NG - 1);

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (st == S_DET && bx == 3'd7) det[2'(32'(rows_q) % 3)][sz][gx] <= det_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; y_q <= '0; gx <= '0; sz <= '0; bx <= '0; rows_q <= '0;
      dxx <= '0; dyy <= '0; dxy <= '0; nms_sc <= 1'b0;
      fp_valid <= 1'b0; fp <= '0; fp_drop <= 1'b0;
    end else begin
      fp_valid <= 1'b0;
      fp_drop  <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_DET; y_q <= row_y; gx <= '0; sz <= '0; bx <= '0;
          dxx <= '0; dyy <= '0; dxy <= '0;
          rows_q <= (row_y == 12'd0) ? 12'd0 : rows_q;
        end
        S_DET: begin
          case (bx)
            3'd0: dxx <= bsum;
            3'd1: dxx <= dxx - 32'sd3 * bsum;
            3'd2: dyy <= bsum;
            3'd3: dyy <= dyy - 32'sd3 * bsum;
            3'd4: dxy <= bsum;
            3'd5: dxy <= dxy + bsum;
            3'd6: dxy <= dxy - bsum;
            default: ;
          endcase
          bx <= bx + 1'b1;
          if (bx == 3'd7) begin
            sz <= sz + 1'b1;
            if (sz == 2'd3) begin
              if (32'(gx) == NG - 1) begin
                gx <= '0; nms_sc <= 1'b0;
                if (rows_q >= 12'd2 && nms_ok_row) st <= S_NMS;
                else begin st <= S_IDLE; rows_q <= rows_q + 1'b1; end
              end else gx <= gx + 1'b1;
            end
          end
        end
        S_NMS: begin
          if (nms_ok_col && is_max) begin
            fp.x <= gx * 12'(STEP); fp.y <= ym;
            fp.fsize <= 8'(nms_sc ? L2 : L1);
            if (fp_full) fp_drop <= 1'b1; else fp_valid <= 1'b1;
          end
          nms_sc <= !nms_sc;
          if (nms_sc) begin
            if (32'(gx) == NG - 1) begin st <= S_IDLE; rows_q <= rows_q + 1'b1; end
            else gx <= gx + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
