// tb_msr_ram: writes numbered Haar pairs into a small scaled RAM (s0 = 2,
// 16-pixel rows -> 8 entries, ring of 4 rows), then reads every position,
// including off-image and overwritten rows, and checks the four neighbours
// against a reference: value where the row is written and still held, zero
// elsewhere. Checks rows_done and 'clear'.
module tb_msr_ram;
  import surf_pkg::*;
  localparam int NX = 8, ROWS = 4;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic clear, wr_en;
  logic [11:0] wr_x, wr_y, rows_done;
  haar_t wr_data;
  logic signed [12:0] rd_x, rd_y;
  haar_t rd_q [4];
  int checks = 0, failures = 0;

  msr_ram #(.IMG_W(16), .S0(2), .ROWS(ROWS)) dut (.*);

  function automatic haar_t expect_q(int x, int y, int nrows);
    haar_t h;
    h = '0;
    if (x >= 0 && x < NX && y >= 0 && y < nrows && y >= nrows - ROWS) begin
      h.dx = 16'(100 * y + x); h.dy = -16'(100 * y + x);
    end
    return h;
  endfunction

  task automatic write_rows(int n);
    for (int y = 0; y < n; y++)
      for (int x = 0; x < NX; x++) begin
        @(negedge clk);
        wr_en = 1; wr_x = 12'(x); wr_y = 12'(y);
        wr_data.dx = 16'(100 * y + x); wr_data.dy = -16'(100 * y + x);
      end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic check_all(int nrows);
    checks++;
    if (int'(rows_done) != nrows) begin failures++; $display("rows_done %0d != %0d", rows_done, nrows); end
    for (int y = -1; y <= nrows; y++)
      for (int x = -1; x <= NX; x++) begin
        rd_x = 13'(x); rd_y = 13'(y);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (rd_q[k] != expect_q(x + (k & 1), y + (k >> 1), nrows)) begin
            failures++; $display("(%0d,%0d) corner %0d wrong", x, y, k);
          end
        end
      end
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_x = 0; wr_y = 0; wr_data = '0; rd_x = 0; rd_y = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    write_rows(3); check_all(3);
    write_rows(7); check_all(7);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++; if (rows_done != 0) begin failures++; $display("clear failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
