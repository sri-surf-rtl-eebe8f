// sri_surf_top: SURF feature extraction (detection, orientation, descriptor)
// built around a scaled-RAM interpolator.
//  - Pixels enter in the I/O clock domain and cross to the calculation clock
//    through an asynchronous FIFO (cdc_fifo).
//  - iig forms the integral image and keeps its last IIROWS rows.
//  - After every image row a row task runs: haar_pre fills the scaled RAMs
//    (msr_ram, s0 = 2..5) with Haar pairs pre-computed on the scaled grid,
//    and two fe_octave detectors (filter sides 9/15/21/27 at step 2 and
//    15/27/39/51 at step 4) compute Hessian determinants and search local
//    maxima. Detected points go to a feature-point queue.
//  - sri_sampler takes each point, samples its neighbourhood from the scaled
//    RAM of its rounded scale with bilinear interpolation (ci3_interp), and
//    drives og (orientation), dg (descriptor sums) and desc_norm.
// Two feedback loops: image reading is stalled (pixel FIFO fills) while a row
// task is still running, while a queued point still needs rows that new rows
// would overwrite, or until the previous frame is finished; and fp_throttle
// raises the Hessian threshold for the next frame when points were lost to a
// full queue or exceeded its target.
// Outputs: one 'desc_valid' pulse per feature point with position, filter
// side, orientation (radians, Q16) and the 64-element Q1.15 descriptor.
// Module structure and feedback loops follow the design; queue depth,
// schedule and widths are this implementation's choices.
module sri_surf_top
  import surf_pkg::*;
#(
  parameter int IMG_W     = 1920,
  parameter int IMG_H     = 1080,
  parameter int IIROWS    = 64,
  parameter int MSR_ROWS  = 84,
  parameter int FPQ_DEPTH = 16,
  parameter int CDC_DEPTH = 16,
  parameter int TARGET    = 3250
) (
  input  logic                     pix_clk,
  input  logic                     pix_rst_n,
  input  logic                     pix_valid,
  output logic                     pix_ready,
  input  logic [PIX_W-1:0]         pix,
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     desc_valid,
  output fp_t                      desc_fp,
  output logic signed [31:0]       desc_angle,
  output logic signed [DESC_W-1:0] desc_vec [DESC_N],
  output logic                     frame_end,      // all points of a frame are detected
  output logic signed [ACC_W-1:0]  threshold,
  output logic [15:0]              last_count,
  output logic [15:0]              last_drops,
  output logic [5:0]               events          // {lower, raise, interp, drop, task-stall, guard-stall}
);
  localparam int B1 = (27 - 1) / 2;   // rows below the centre needed by octave 1
  localparam int B2 = (51 - 1) / 2;   // and by octave 2

  // ---------------- clock crossing ----------------
  logic c_valid, c_ready;
  logic [PIX_W-1:0] c_pix;
  cdc_fifo #(.W(PIX_W), .DEPTH(CDC_DEPTH)) u_cdc (
    .wclk(pix_clk), .wrst_n(pix_rst_n), .wvalid(pix_valid), .wready(pix_ready), .wdata(pix),
    .rclk(clk), .rrst_n(rst_n), .rvalid(c_valid), .rready(c_ready), .rdata(c_pix));

  // ---------------- integral image ----------------
  localparam int NRD = 16;
  logic signed [12:0] ii_row [NRD];
  logic signed [12:0] ii_col [NRD];
  logic [II_W-1:0]    ii_dat [NRD];
  logic hold, row_done, frame_done, frame_start;
  logic [11:0] row_idx;
  iig #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ROWS(IIROWS), .NRD(NRD)) u_iig (
    .clk, .rst_n, .pix_valid(c_valid), .pix_ready(c_ready), .pix(c_pix), .hold,
    .row_done, .row_idx, .frame_done, .frame_start,
    .rd_row(ii_row), .rd_col(ii_col), .rd_data(ii_dat));

  // ---------------- Haar pre-computation into the scaled RAMs ----------------
  logic h_start, h_busy, h_wr;
  logic [2:0] h_s0;
  logic [11:0] h_y, h_wx, h_wy;
  logic [1:0] h_sidx;
  haar_t h_wd;
  logic signed [12:0] h_row [8];
  logic signed [12:0] h_col [8];
  logic [II_W-1:0]    h_dat [8];
  haar_pre #(.IMG_W(IMG_W)) u_haar (
    .clk, .rst_n, .start(h_start), .s0(h_s0), .row_y(h_y), .busy(h_busy),
    .rd_row(h_row), .rd_col(h_col), .rd_data(h_dat),
    .wr_en(h_wr), .wr_sidx(h_sidx), .wr_x(h_wx), .wr_y(h_wy), .wr_data(h_wd));

  logic [1:0] s_rd_sidx;
  logic signed [12:0] s_rd_x, s_rd_y;
  haar_t msr_q [NSCALE][4];
  haar_t s_rd_q [4];
  logic [11:0] msr_rows [NSCALE];
  logic msr_clear;
  for (genvar g = 0; g < NSCALE; g++) begin : g_msr
    msr_ram #(.IMG_W(IMG_W), .S0(S0_MIN + g), .ROWS(MSR_ROWS)) u_msr (
      .clk, .rst_n, .clear(msr_clear), .wr_en(h_wr && h_sidx == 2'(g)),
      .wr_x(h_wx), .wr_y(h_wy), .wr_data(h_wd),
      .rd_x(s_rd_x), .rd_y(s_rd_y), .rd_q(msr_q[g]), .rows_done(msr_rows[g]));
  end
  assign s_rd_q = msr_q[s_rd_sidx];

  // ---------------- feature detection ----------------
  logic f1_start, f2_start, f1_busy, f2_busy;
  logic [11:0] f1_y, f2_y;
  logic signed [12:0] f1_row [4];
  logic signed [12:0] f1_col [4];
  logic signed [12:0] f2_row [4];
  logic signed [12:0] f2_col [4];
  logic [II_W-1:0] f1_dat [4];
  logic [II_W-1:0] f2_dat [4];
  logic f1_v, f2_v, f1_drop, f2_drop, fpq_full;
  fp_t  f1_fp, f2_fp;
  fe_octave #(.IMG_W(IMG_W), .IMG_H(IMG_H), .STEP(2), .L0(9), .L1(15), .L2(21), .L3(27)) u_fe1 (
    .clk, .rst_n, .start(f1_start), .row_y(f1_y), .threshold, .busy(f1_busy),
    .rd_row(f1_row), .rd_col(f1_col), .rd_data(f1_dat),
    .fp_valid(f1_v), .fp(f1_fp), .fp_full(fpq_full), .fp_drop(f1_drop));
  fe_octave #(.IMG_W(IMG_W), .IMG_H(IMG_H), .STEP(4), .L0(15), .L1(27), .L2(39), .L3(51)) u_fe2 (
    .clk, .rst_n, .start(f2_start), .row_y(f2_y), .threshold, .busy(f2_busy),
    .rd_row(f2_row), .rd_col(f2_col), .rd_data(f2_dat),
    .fp_valid(f2_v), .fp(f2_fp), .fp_full(fpq_full), .fp_drop(f2_drop));

  // integral-image read ports: 0..7 Haar, 8..11 octave 1, 12..15 octave 2
  always_comb begin
    for (int p = 0; p < 8; p++) begin ii_row[p] = h_row[p]; ii_col[p] = h_col[p]; h_dat[p] = ii_dat[p]; end
    for (int p = 0; p < 4; p++) begin
      ii_row[8+p]  = f1_row[p]; ii_col[8+p]  = f1_col[p]; f1_dat[p] = ii_dat[8+p];
      ii_row[12+p] = f2_row[p]; ii_col[12+p] = f2_col[p]; f2_dat[p] = ii_dat[12+p];
    end
  end

  // ---------------- row task sequencer ----------------
  logic        pend, frame_last_pend;
  logic [11:0] pend_row, task_row;
  logic        task_last;
  logic [2:0]  h_sc;              // next s0 to try, 6 = done
  logic        h_wait;
  logic        tasks_busy;
  logic        frame_open, frame_all;
  logic [11:0] rows_in;
  assign tasks_busy = (h_sc != 3'd6) || h_wait || h_busy || f1_busy || f2_busy || f1_start || f2_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; frame_last_pend <= 1'b0; pend_row <= '0; task_row <= '0; task_last <= 1'b0;
      h_sc <= 3'd6; h_wait <= 1'b0; h_start <= 1'b0; h_s0 <= 3'd2; h_y <= '0;
      f1_start <= 1'b0; f2_start <= 1'b0; f1_y <= '0; f2_y <= '0;
      frame_open <= 1'b0; frame_all <= 1'b0; frame_end <= 1'b0; rows_in <= '0;
    end else begin
      h_start <= 1'b0; f1_start <= 1'b0; f2_start <= 1'b0; frame_end <= 1'b0;
      if (c_valid && c_ready && frame_start) begin
        frame_open <= 1'b1; frame_all <= 1'b0; rows_in <= '0;
      end
      if (row_done) begin
        pend <= 1'b1; pend_row <= row_idx; frame_last_pend <= frame_done;
        rows_in <= row_idx + 1'b1;
      end
      // launch the tasks of a completed row
      if (pend && !tasks_busy && !row_done) begin
        pend <= 1'b0; task_row <= pend_row; task_last <= frame_last_pend;
        h_sc <= 3'd2;
        if (pend_row >= 12'(B1) && pend_row[0] == 1'(B1 % 2)) begin
          f1_start <= 1'b1; f1_y <= pend_row - 12'(B1);
        end
        if (pend_row >= 12'(B2) && pend_row[1:0] == 2'(B2 % 4)) begin
          f2_start <= 1'b1; f2_y <= pend_row - 12'(B2);
        end
      end
      // Haar rows: scaled row Y of scale s0 is complete when (r+1) % s0 == 0
      if (h_sc != 3'd6 && !h_wait && !h_busy) begin
        if ((32'(task_row) + 1) % 32'(h_sc) == 0) begin
          h_start <= 1'b1; h_s0 <= h_sc; h_y <= 12'((32'(task_row) + 1) / 32'(h_sc) - 1);
          h_wait <= 1'b1;
        end
        h_sc <= (h_sc == 3'd5) ? 3'd6 : h_sc + 1'b1;
      end
      if (h_wait && h_busy) h_wait <= 1'b0;
      // frame finished once the last row's tasks are done
      if (frame_open && !pend && !tasks_busy && task_last) begin
        frame_open <= 1'b0; frame_all <= 1'b1; frame_end <= 1'b1; task_last <= 1'b0;
      end
    end
  end
  assign msr_clear = c_valid && c_ready && frame_start;

  // ---------------- feature-point queue ----------------
  localparam int QAW = $clog2(FPQ_DEPTH);
  fp_t fpq [FPQ_DEPTH];
  logic [QAW:0] q_wp, q_rp, q_cnt;
  logic q_pop;
  assign q_cnt    = q_wp - q_rp;
  assign fpq_full = (32'(q_cnt) >= FPQ_DEPTH - 1);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_wp <= '0; q_rp <= '0;
    end else begin
      q_wp <= q_wp + (QAW+1)'(f1_v) + (QAW+1)'(f2_v);
      if (q_pop) q_rp <= q_rp + 1'b1;
    end
  end
  always_ff @(posedge clk) begin
    if (f1_v) fpq[q_wp[QAW-1:0]] <= f1_fp;
    if (f2_v) fpq[QAW'(q_wp + (QAW+1)'(f1_v))] <= f2_fp;
  end

  // ---------------- threshold feedback ----------------
  fp_throttle #(.TARGET(TARGET)) u_thr (
    .clk, .rst_n, .fp_accept({f2_v, f1_v}), .fp_drop({f2_drop, f1_drop}), .frame_done(frame_end),
    .threshold, .last_count, .last_drops, .raised(events[4]), .lowered(events[5]));

  // ---------------- scaled-RAM interpolator and description ----------------
  logic og_clear, og_valid, og_finish, og_done, og_busy;
  logic signed [ACC_W-1:0] og_dx, og_dy;
  logic signed [31:0] og_cos, og_sin, og_angle;
  logic dg_clear, dg_valid, norm_start, norm_done, norm_busy, samp_busy;
  logic [4:0] dg_ku, dg_kv;
  logic signed [ACC_W-1:0] dg_rx, dg_ry;
  logic signed [ACC_W-1:0] dg_vec [DESC_N];
  fp_t cur_fp;
  sri_sampler u_samp (
    .clk, .rst_n, .fp_valid(q_cnt != 0), .fp_in(fpq[q_rp[QAW-1:0]]), .fp_pop(q_pop),
    .rows_done(msr_rows), .frame_all,
    .rd_sidx(s_rd_sidx), .rd_x(s_rd_x), .rd_y(s_rd_y), .rd_q(s_rd_q),
    .og_clear, .og_valid, .og_dx, .og_dy, .og_finish, .og_done, .og_cos, .og_sin,
    .dg_clear, .dg_valid, .dg_ku, .dg_kv, .dg_rx, .dg_ry, .norm_start, .norm_done,
    .cur_fp, .busy(samp_busy), .frac_seen(events[3]));
  og u_og (
    .clk, .rst_n, .clear(og_clear), .in_valid(og_valid), .in_dx(og_dx), .in_dy(og_dy),
    .finish(og_finish), .busy(og_busy), .done(og_done), .angle(og_angle), .cos_o(og_cos), .sin_o(og_sin));
  dg u_dg (
    .clk, .rst_n, .clear(dg_clear), .in_valid(dg_valid), .ku(dg_ku), .kv(dg_kv),
    .rx(dg_rx), .ry(dg_ry), .vec(dg_vec));
  desc_norm u_norm (
    .clk, .rst_n, .start(norm_start), .vec_in(dg_vec), .busy(norm_busy), .done(norm_done),
    .vec_out(desc_vec));

  assign desc_valid = norm_done;
  assign desc_fp    = cur_fp;
  assign desc_angle = og_angle;

  // ---------------- image stall ----------------
  function automatic logic guard(input fp_t f, input logic [11:0] r);
    return 32'(r) >= 32'(f.y) + 32'(MSR_ROWS / 2) * 32'(scale_s0(f.fsize));
  endfunction
  logic g_stall, t_stall, f_stall;
  assign g_stall = ((q_cnt != 0) && guard(fpq[q_rp[QAW-1:0]], rows_in)) || (samp_busy && guard(cur_fp, rows_in));
  assign t_stall = pend;
  assign f_stall = frame_start && (frame_open || q_cnt != 0 || samp_busy);
  assign hold    = g_stall || t_stall || f_stall;
  assign events[0] = g_stall && c_valid;
  assign events[1] = t_stall && c_valid;
  assign events[2] = f1_drop || f2_drop;
endmodule
