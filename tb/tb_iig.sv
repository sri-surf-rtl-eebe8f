// tb_iig: feeds a random 12x7 image (with gaps in the pixel stream and a
// hold phase), then reads every integral-image value back through the read
// port and compares it with sums computed directly from the pixels. Also
// checks the zero region above/left of the image, the right-edge clamp, the
// row_done / frame_done pulses, and that 'hold' stops pixel acceptance.
module tb_iig;
  import surf_pkg::*;
  localparam int W = 12, H = 7;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic pix_valid, pix_ready, hold, row_done, frame_done, frame_start;
  logic [7:0] pix;
  logic [11:0] row_idx;
  logic signed [12:0] rd_row [1];
  logic signed [12:0] rd_col [1];
  logic [II_W-1:0] rd_data [1];
  int checks = 0, failures = 0, rows_seen = 0, frames_seen = 0;
  logic [7:0] img [H][W];

  iig #(.IMG_W(W), .IMG_H(H), .ROWS(8), .NRD(1)) dut (.*);

  always @(posedge clk) begin
    if (row_done) rows_seen++;
    if (frame_done) frames_seen++;
  end

  function automatic longint ref_ii(int r, int c);
    longint s = 0;
    for (int i = 0; i <= r && i < H; i++)
      for (int j = 0; j <= c && j < W; j++) s += img[i][j];
    return s;
  endfunction

  initial begin
    pix_valid = 0; pix = 0; hold = 0; rd_row[0] = 0; rd_col[0] = 0;
    for (int i = 0; i < H; i++) for (int j = 0; j < W; j++) img[i][j] = 8'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    checks++; if (!frame_start) begin failures++; $display("frame_start not set"); end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++) begin
        @(negedge clk);
        if ($urandom % 4 == 0) begin pix_valid = 0; @(negedge clk); end
        if (i == 3 && j == 5) begin
          hold = 1; pix_valid = 1; pix = img[i][j];
          @(negedge clk);
          checks++; if (pix_ready) begin failures++; $display("ready while held"); end
          hold = 0;
        end
        pix_valid = 1; pix = img[i][j];
        @(posedge clk);
        #1 pix_valid = 0;
      end
    repeat (3) @(posedge clk);
    for (int r = -1; r < H; r++)
      for (int c = -1; c < W + 2; c++) begin
        rd_row[0] = 13'(r); rd_col[0] = 13'(c);
        #1;
        checks++;
        if (longint'(rd_data[0]) != ((r < 0 || c < 0) ? 0 : ref_ii(r, c))) begin
          failures++; $display("II(%0d,%0d) = %0d, expected %0d", r, c, rd_data[0], ref_ii(r, c));
        end
      end
    checks++; if (rows_seen != H) begin failures++; $display("rows_done %0d", rows_seen); end
    checks++; if (frames_seen != 1) begin failures++; $display("frame_done %0d", frames_seen); end
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
