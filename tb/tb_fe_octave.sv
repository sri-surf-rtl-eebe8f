// tb_fe_octave: a 64x64 image with bright discs of several radii on a noisy
// background is served as an integral image from a behavioural table. The
// detector runs every even centre row. A reference in the testbench computes
// each box-filter response directly from pixel sums, normalises it the same
// way (area reciprocal 2^32/L^2, Q8 responses, 0.81 = 53084/2^16), searches
// 3x3x3 maxima above the threshold, and the list of points must match the
// detector's exactly. Also checks the 32-clocks-per-grid-point rate and that
// points are dropped, not sent, while the queue reports full.
module tb_fe_octave;
  import surf_pkg::*;
  localparam int W = 64, H = 64, STEP = 2, NG = W / STEP;
  localparam int LS [4] = '{9, 15, 21, 27};
  localparam int M = 13 + STEP;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic start, busy, fp_valid, fp_full, fp_drop;
  logic [11:0] row_y;
  logic signed [ACC_W-1:0] threshold;
  logic signed [12:0] rd_row [4];
  logic signed [12:0] rd_col [4];
  logic [II_W-1:0] rd_data [4];
  fp_t fp;
  int checks = 0, failures = 0;
  int img [H][W];
  longint ii [H][W];

  fe_octave #(.IMG_W(W), .IMG_H(H), .STEP(2), .L0(9), .L1(15), .L2(21), .L3(27)) dut (.*);

  always_comb
    for (int p = 0; p < 4; p++) begin
      int r, c;
      r = int'(rd_row[p]); c = int'(rd_col[p]);
      if (c > W - 1) c = W - 1;
      if (r > H - 1) r = H - 1;
      rd_data[p] = (r < 0 || c < 0) ? '0 : II_W'(ii[r][c]);
    end

  function automatic longint boxs(int r0, int c0, int nr, int nc);
    longint s = 0;
    for (int r = r0; r < r0 + nr; r++)
      for (int c = c0; c < c0 + nc; c++)
        if (r >= 0 && c >= 0 && r < H && c < W) s += img[r][c];
    return s;
  endfunction

  longint rdet [H][4][NG];
  function automatic longint det_ref(int r, int c, int L);
    longint l, b, dxx, dyy, dxy, inv, nxx, nyy, nxy;
    l = L / 3; b = (L - 1) / 2;
    dxx = boxs(r - l + 1, c - b, 2 * l - 1, L) - 3 * boxs(r - l + 1, c - l / 2, 2 * l - 1, l);
    dyy = boxs(r - b, c - l + 1, L, 2 * l - 1) - 3 * boxs(r - l / 2, c - l + 1, l, 2 * l - 1);
    dxy = boxs(r - l, c + 1, l, l) + boxs(r + 1, c - l, l, l) - boxs(r - l, c - l, l, l) - boxs(r + 1, c + 1, l, l);
    inv = (64'd1 << 32) / (L * L);
    nxx = (dxx * inv) >>> 24; nyy = (dyy * inv) >>> 24; nxy = (dxy * inv) >>> 24;
    return nxx * nyy - ((nxy * nxy * 53084) >>> 16);
  endfunction

  fp_t got [$];
  fp_t exp_q [$];
  int drops = 0;
  always @(posedge clk) begin
    if (fp_valid) got.push_back(fp);
    if (fp_drop) drops++;
  end

  int cyc;
  initial begin
    start = 0; row_y = 0; fp_full = 0;
    threshold = 48'sd200000;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = int'($urandom % 16);
    // discs: (row, col, radius)
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      if ((r - 30) ** 2 + (c - 24) ** 2 <= 9)  img[r][c] += 200;
      if ((r - 34) ** 2 + (c - 42) ** 2 <= 16) img[r][c] += 180;
      if ((r - 20) ** 2 + (c - 34) ** 2 <= 4)  img[r][c] += 150;
    end
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      ii[r][c] = img[r][c] + (r > 0 ? ii[r-1][c] : 0) + (c > 0 ? ii[r][c-1] : 0) - (r > 0 && c > 0 ? ii[r-1][c-1] : 0);
    // reference detections
    for (int y = 0; y + 13 < H; y += STEP)
      for (int g = 0; g < NG; g++)
        for (int s = 0; s < 4; s++) rdet[y][s][g] = det_ref(y, g * STEP, LS[s]);
    for (int y = STEP; y + 13 + STEP < H; y += STEP) begin
      if (y < M || y >= H - M) continue;
      for (int g = 1; g < NG - 1; g++) begin
        if (g * STEP < M || g * STEP >= W - M) continue;
        for (int s = 1; s <= 2; s++) begin
          bit mx;
          mx = rdet[y][s][g] > threshold;
          for (int ds = -1; ds <= 1; ds++) for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
            if (!(ds == 0 && dr == 0 && dc == 0) && rdet[y + dr * STEP][s + ds][g + dc] >= rdet[y][s][g]) mx = 0;
          if (mx) begin
            fp_t f;
            f.x = 12'(g * STEP); f.y = 12'(y); f.fsize = 8'(LS[s]);
            exp_q.push_back(f);
          end
        end
      end
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int y = 0; y + 13 < H; y += STEP) begin
      @(negedge clk); start = 1; row_y = 12'(y);
      @(negedge clk); start = 0; cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      if (y == 0) begin
        checks++;
        if (cyc != NG * 32 + 1) begin failures++; $display("row took %0d clocks, expected %0d", cyc, NG * 32 + 1); end
      end
    end
    checks++;
    if (got.size() != exp_q.size()) begin
      failures++; $display("%0d points, expected %0d", got.size(), exp_q.size());
    end
    for (int i = 0; i < exp_q.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] != exp_q[i]) begin
        failures++; $display("point %0d: got (%0d,%0d,L%0d) expected (%0d,%0d,L%0d)", i,
          got[i].x, got[i].y, got[i].fsize, exp_q[i].x, exp_q[i].y, exp_q[i].fsize);
      end
    end
    checks++;
    if (exp_q.size() < 2) begin failures++; $display("test image too weak: %0d points", exp_q.size()); end
    // queue full: the same frame again, everything must be dropped
    got.delete(); fp_full = 1;
    for (int y = 0; y + 13 < H; y += STEP) begin
      @(negedge clk); start = 1; row_y = 12'(y);
      @(negedge clk); start = 0;
      while (busy) @(negedge clk);
    end
    checks++;
    if (got.size() != 0 || drops != exp_q.size()) begin
      failures++; $display("full queue: %0d sent, %0d dropped", got.size(), drops);
    end
    $display("expected points %0d", exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
