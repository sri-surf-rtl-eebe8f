// tb_fp_throttle: plays frames with chosen numbers of accepted and dropped
// points and checks the per-frame counts and the threshold after each frame
// against the rule: x1.5 after drops or more than TARGET points, x0.75 (not
// below THR_MIN) after fewer than TARGET/4 points, unchanged otherwise.
module tb_fp_throttle;
  import surf_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic frame_done, raised, lowered;
  logic [1:0] fp_accept;
  logic [1:0] fp_drop;
  logic signed [ACC_W-1:0] threshold;
  logic [15:0] last_count, last_drops;
  int checks = 0, failures = 0;

  fp_throttle #(.TARGET(40), .THR_INIT(48'sd1000), .THR_MIN(48'sd600)) dut (.*);

  longint thr_ref = 1000;
  task automatic frame(int acc, int drp);
    int a = 0, d = 0;
    logic exp_r, exp_l;
    while (a < acc || d < drp) begin
      @(negedge clk);
      fp_accept = (a + 1 < acc) ? 2'b11 : (a < acc) ? 2'b01 : 2'b00; fp_drop = (d < drp) ? 2'b01 : 2'b00;
      a += (a + 1 < acc) ? 2 : (a < acc) ? 1 : 0;
      if (d < drp) d++;
    end
    @(negedge clk); fp_accept = 0; fp_drop = 0; frame_done = 1;
    @(negedge clk); frame_done = 0;
    exp_r = 0; exp_l = 0;
    if (drp > 0 || acc > 40) begin thr_ref = thr_ref + thr_ref / 2; exp_r = 1; end
    else if (acc * 4 < 40) begin
      thr_ref = thr_ref - thr_ref / 4; if (thr_ref < 600) thr_ref = 600; exp_l = 1;
    end
    checks++;
    if (threshold != thr_ref || last_count != 16'(acc) || last_drops != 16'(drp)) begin
      failures++; $display("frame %0d/%0d: thr %0d (exp %0d), count %0d drops %0d", acc, drp,
                           threshold, thr_ref, last_count, last_drops);
    end
  endtask

  int nr = 0, nl = 0;
  always @(posedge clk) begin if (raised) nr++; if (lowered) nl++; end

  initial begin
    fp_accept = 0; fp_drop = 0; frame_done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    frame(20, 0);   // in range: unchanged
    frame(30, 3);   // drops: raise
    frame(50, 0);   // above target: raise
    frame(5, 0);    // few: lower
    frame(2, 0);    // few: lower
    frame(0, 0);    // few: lower, clamp to minimum
    frame(0, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (nr != 2 || nl != 4) begin failures++; $display("raised %0d lowered %0d", nr, nl); end
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
