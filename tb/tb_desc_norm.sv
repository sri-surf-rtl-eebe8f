// tb_desc_norm: normalises random descriptors (and an all-zero one) and
// compares every element with floor(|v| * 2^15 / floor(sqrt(sum v^2)))
// with v's sign, computed by the testbench; checks the clock count
// 64 + 52 + 64*17 (+ a few for the handshake) and that the squared
// outputs sum to about 1.
module tb_desc_norm;
  import surf_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic signed [ACC_W-1:0] vec_in [DESC_N];
  logic signed [DESC_W-1:0] vec_out [DESC_N];
  int checks = 0, failures = 0;

  desc_norm dut (.*);

  function automatic longint isqrt(longint n);
    longint r = 0;
    for (int b = 31; b >= 0; b--)
      if ((r + (64'd1 << b)) * (r + (64'd1 << b)) <= n) r += 64'd1 << b;
    return r;
  endfunction

  task automatic run(int kind);
    longint ss, root, e;
    real sq;
    int cyc;
    ss = 0;
    for (int i = 0; i < DESC_N; i++) begin
      longint v;
      v = (kind == 0) ? 0 : longint'($urandom % 2000000) - 1000000;
      if (kind == 2 && i != 5) v = 0;
      vec_in[i] = ACC_W'(v); ss += v * v;
    end
    root = isqrt(ss);
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    sq = 0;
    for (int i = 0; i < DESC_N; i++) begin
      longint a;
      a = (vec_in[i] < 0) ? -longint'(vec_in[i]) : longint'(vec_in[i]);
      e = (root == 0) ? 0 : (a >= root) ? 32767 : (a * 32768) / root;
      if (vec_in[i] < 0) e = -e;
      checks++;
      if (longint'(vec_out[i]) != e) begin failures++; $display("element %0d: %0d vs %0d", i, vec_out[i], e); end
      sq += (real'(vec_out[i]) / 32768.0) ** 2;
    end
    checks++;
    if (kind != 0 && (sq < 0.99 || sq > 1.0001)) begin failures++; $display("squared sum %f", sq); end
    checks++;
    if (cyc > 64 + 52 + 64 * 17 + 4) begin failures++; $display("took %0d clocks", cyc); end
  endtask

  initial begin
    start = 0;
    foreach (vec_in[i]) vec_in[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(1); run(1); run(2); run(0); run(1);
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
