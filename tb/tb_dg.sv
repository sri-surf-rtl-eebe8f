// tb_dg: streams 400 random rotated responses with their grid indices and
// compares all 64 sums with sub-region sums computed by the testbench;
// then checks that 'clear' empties the vector.
module tb_dg;
  import surf_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic clear, in_valid;
  logic [4:0] ku, kv;
  logic signed [ACC_W-1:0] rx, ry;
  logic signed [ACC_W-1:0] vec [DESC_N];
  int checks = 0, failures = 0;
  longint ref_v [DESC_N];

  dg dut (.*);

  initial begin
    clear = 0; in_valid = 0; ku = 0; kv = 0; rx = 0; ry = 0;
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int v = 0; v < 20; v++)
      for (int u = 0; u < 20; u++) begin
        longint a, b;
        int r;
        a = longint'($urandom % 200000) - 100000; b = longint'($urandom % 200000) - 100000;
        r = (v / 5) * 4 + (u / 5);
        ref_v[4*r] += a; ref_v[4*r+1] += b;
        ref_v[4*r+2] += (a < 0) ? -a : a; ref_v[4*r+3] += (b < 0) ? -b : b;
        in_valid = 1; ku = 5'(u); kv = 5'(v); rx = ACC_W'(a); ry = ACC_W'(b);
        @(negedge clk);
      end
    in_valid = 0;
    @(negedge clk);
    for (int i = 0; i < DESC_N; i++) begin
      checks++;
      if (longint'(vec[i]) != ref_v[i]) begin failures++; $display("element %0d: %0d vs %0d", i, vec[i], ref_v[i]); end
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < DESC_N; i++) begin
      checks++;
      if (vec[i] != 0) begin failures++; $display("element %0d not cleared", i); end
    end
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
