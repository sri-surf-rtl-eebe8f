// tb_og: for a set of target directions, streams 109 responses whose
// directions scatter around the target (plus weak noise in all directions),
// and checks that the orientation is within 6 degrees of the direction of
// the summed responses in the best 60-degree window, computed in real
// arithmetic by the testbench, that cos/sin match that angle within 0.002,
// and that the result comes within 36 + 2*18 + 8 clocks of 'finish'.
module tb_og;
  import surf_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic clear, in_valid, finish, busy, done;
  logic signed [ACC_W-1:0] in_dx, in_dy;
  logic signed [31:0] angle, cos_o, sin_o;
  int checks = 0, failures = 0;

  og dut (.*);

  localparam real PI = 3.14159265358979;
  real sx [109], sy [109];

  task automatic run(real target);
    real bx, by, bm, ref_a, got_a, err, a_i;
    int cyc;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < 109; i++) begin
      real mag, ang;
      if (i % 4 == 3) begin mag = 300.0; ang = 2.0 * PI * ($urandom % 1000) / 1000.0; end
      else begin mag = 1000.0 + ($urandom % 3000); ang = target + (($urandom % 1000) / 1000.0 - 0.5) * 0.6; end
      sx[i] = $floor(mag * $cos(ang)); sy[i] = $floor(mag * $sin(ang));
      in_valid = 1; in_dx = ACC_W'(longint'(sx[i])); in_dy = ACC_W'(longint'(sy[i]));
      @(negedge clk);
    end
    in_valid = 0; finish = 1; @(negedge clk); finish = 0; cyc = 1;
    // reference: best 60-degree window over 36 sectors of 10 degrees
    bm = -1.0; bx = 0; by = 0;
    for (int k = 0; k < 36; k++) begin
      real wx = 0, wy = 0;
      for (int i = 0; i < 109; i++) begin
        a_i = $atan2(sy[i], sx[i]); if (a_i < 0) a_i += 2.0 * PI;
        for (int j = 0; j < 6; j++)
          if (int'($floor(a_i / (PI / 18.0))) % 36 == (k + j) % 36) begin wx += sx[i]; wy += sy[i]; end
      end
      if (wx * wx + wy * wy > bm) begin bm = wx * wx + wy * wy; bx = wx; by = wy; end
    end
    ref_a = $atan2(by, bx);
    while (!done) begin @(negedge clk); cyc++; end
    got_a = real'(angle) / 65536.0;
    err = got_a - ref_a;
    if (err > PI) err -= 2.0 * PI;
    if (err < -PI) err += 2.0 * PI;
    checks++;
    if (err > 0.105 || err < -0.105) begin
      failures++; $display("target %f: angle %f, expected %f", target, got_a, ref_a);
    end
    checks++;
    if ((real'(cos_o) / 65536.0 - $cos(got_a)) ** 2 > 4e-6 || (real'(sin_o) / 65536.0 - $sin(got_a)) ** 2 > 4e-6) begin
      failures++; $display("cos/sin %0d %0d for angle %f", cos_o, sin_o, got_a);
    end
    checks++;
    if (cyc > 36 + 2 * 18 + 8) begin failures++; $display("took %0d clocks", cyc); end
  endtask

  initial begin
    clear = 0; in_valid = 0; finish = 0; in_dx = 0; in_dy = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0.3); run(1.2); run(2.0); run(3.0); run(-2.5); run(-1.0); run(-0.1); run(1.5708);
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
