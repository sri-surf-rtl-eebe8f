// tb_haar_pre: serves the integral image of a random 30x20 image to the
// pre-computation unit from a behavioural table, runs scaled rows for every
// s0 = 2..5, and compares each written Haar pair with right-minus-left and
// bottom-minus-top sums taken directly from the pixels (zero outside the
// image). Also checks the write count and the clocks per row (IMG_W/s0 + 1).
module tb_haar_pre;
  import surf_pkg::*;
  localparam int W = 30, H = 20;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic start, busy, wr_en;
  logic [2:0] s0;
  logic [11:0] row_y, wr_x, wr_y;
  logic [1:0] wr_sidx;
  haar_t wr_data;
  logic signed [12:0] rd_row [8];
  logic signed [12:0] rd_col [8];
  logic [II_W-1:0] rd_data [8];
  int checks = 0, failures = 0;
  int img [H][W];
  longint ii [H][W];

  haar_pre #(.IMG_W(W)) dut (.*);

  always_comb
    for (int p = 0; p < 8; p++) begin
      int r, c;
      r = int'(rd_row[p]); c = int'(rd_col[p]);
      if (c > W - 1) c = W - 1;
      if (r > H - 1) r = H - 1;
      rd_data[p] = (r < 0 || c < 0) ? '0 : II_W'(ii[r][c]);
    end

  function automatic int pix(int r, int c);
    return (r < 0 || c < 0 || r >= H || c >= W) ? 0 : img[r][c];
  endfunction

  int cur_s0, n_wr, cyc;
  always @(posedge clk) if (wr_en) begin
    int xc, yc, sR, sL, sB, sT;
    n_wr++;
    xc = int'(wr_x) * cur_s0; yc = int'(wr_y) * cur_s0;
    sR = 0; sL = 0; sB = 0; sT = 0;
    for (int r = yc - cur_s0; r < yc + cur_s0; r++)
      for (int c = xc - cur_s0; c < xc + cur_s0; c++) begin
        if (c >= xc) sR += pix(r, c); else sL += pix(r, c);
        if (r >= yc) sB += pix(r, c); else sT += pix(r, c);
      end
    checks++;
    if (int'(wr_data.dx) != sR - sL || int'(wr_data.dy) != sB - sT || int'(wr_sidx) != cur_s0 - 2) begin
      failures++;
      $display("s0=%0d (%0d,%0d): got %0d %0d, expected %0d %0d", cur_s0, wr_x, wr_y,
               wr_data.dx, wr_data.dy, sR - sL, sB - sT);
    end
  end

  initial begin
    start = 0; s0 = 2; row_y = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = int'($urandom % 256);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
      ii[r][c] = img[r][c] + (r > 0 ? ii[r-1][c] : 0) + (c > 0 ? ii[r][c-1] : 0) - (r > 0 && c > 0 ? ii[r-1][c-1] : 0);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 2; s <= 5; s++)
      for (int y = 0; y * s + s - 1 < H; y++) begin
        cur_s0 = s; n_wr = 0;
        @(negedge clk); start = 1; s0 = 3'(s); row_y = 12'(y);
        @(negedge clk); start = 0; cyc = 1;
        while (busy) begin @(negedge clk); cyc++; end
        @(negedge clk);
        checks++;
        if (n_wr != W / s || cyc != W / s + 1) begin
          failures++; $display("s0=%0d row %0d: %0d writes in %0d clocks", s, y, n_wr, cyc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
