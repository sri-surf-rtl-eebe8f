// tb_sri_sampler: the scaled RAMs are replaced by a linear Haar field,
// dx(X,Y) = 16*X + 3*Y, dy(X,Y) = -5*X + 7*Y on the grid of every scale,
// which bilinear interpolation reproduces exactly at any fractional
// position. One feature point per scale (s0 = 2..5) is served; the
// orientation generator is a stub answering angle 30 degrees after 'finish'.
// The testbench recomputes every sample's position ((p + 0.5)/s0 with
// p = x + i*s, or the rotated descriptor grid), its Gaussian weight and,
// for the descriptor, the response turned into the point's frame, and
// compares them with the sampler's outputs (tolerance 0.5%). It also checks
// 109 + 400 samples per point, one sample per clock, that a point waits
// until its rows are present, and that fractional positions occurred.
module tb_sri_sampler;
  import surf_pkg::*;
  logic clk = 0, rst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {rst_n} = '0;
  always #5 clk = ~clk;
  logic fp_valid, fp_pop, frame_all;
  fp_t fp_in, cur_fp;
  logic [11:0] rows_done [NSCALE];
  logic [1:0] rd_sidx;
  logic signed [12:0] rd_x, rd_y;
  haar_t rd_q [4];
  logic og_clear, og_valid, og_finish, og_done;
  logic signed [ACC_W-1:0] og_dx, og_dy, dg_rx, dg_ry;
  logic signed [31:0] og_cos, og_sin;
  logic dg_clear, dg_valid, norm_start, norm_done, busy, frac_seen;
  logic [4:0] dg_ku, dg_kv;
  int checks = 0, failures = 0;

  sri_sampler dut (.*);

  // linear field in the scaled RAM
  always_comb
    for (int k = 0; k < 4; k++) begin
      int X, Y;
      X = int'(rd_x) + (k & 1); Y = int'(rd_y) + (k >> 1);
      rd_q[k].dx = 16'(16 * X + 3 * Y);
      rd_q[k].dy = 16'(-5 * X + 7 * Y);
    end

  localparam real PI = 3.14159265358979;
  localparam real ANG = PI / 6.0;
  real s, s0r;
  int n_og, n_dg, og_first, og_last, dg_first, dg_last, cyc, bad;
  int oi, oj;

  function automatic real gauss(real d, real sig);
    return $exp(-(d * d) / (2.0 * sig * sig));
  endfunction

  // tolerance: 0.5% plus the 16-bit quantisation of the weight on the unweighted value
  function automatic bit close(real got, real expv, real unw);
    real tol;
    tol = 0.005 * ((expv < 0) ? -expv : expv) + 2.0 * ((unw < 0) ? -unw : unw) / 65536.0 + 2.0;
    return (got - expv <= tol) && (expv - got <= tol);
  endfunction

  // orientation stub and checkers
  always @(posedge clk) begin
    cyc++;
    og_done <= 1'b0; norm_done <= 1'b0;
    if (og_finish) og_done <= 1'b1;
    if (norm_start) norm_done <= 1'b1;
    if (og_clear) begin oi = -6; oj = -6; end
    if (og_valid) begin
      real X, Y, ex, ey, w;
      n_og++;
      if (n_og == 1) og_first = cyc;
      og_last = cyc;
      while (oi * oi + oj * oj >= 36) begin
        if (oi == 6) begin oi = -6; oj++; end else oi++;
      end
      X = (real'(cur_fp.x) + oi * s + 0.5) / s0r; Y = (real'(cur_fp.y) + oj * s + 0.5) / s0r;
      w = gauss(oi, 2.5) * gauss(oj, 2.5);
      ex = (16.0 * X + 3.0 * Y) * 256.0 * w; ey = (-5.0 * X + 7.0 * Y) * 256.0 * w;
      checks++;
      if (!close(real'(og_dx), ex, ex / w) || !close(real'(og_dy), ey, ey / w)) begin
        failures++; if (bad++ < 5) $display("og sample (%0d,%0d): %0d %0d expected %f %f", oi, oj, og_dx, og_dy, ex, ey);
      end
      if (oi == 6) begin oi = -6; oj++; end else oi++;
    end
    if (dg_valid) begin
      real u, v, X, Y, dx, dy, w, ex, ey;
      n_dg++;
      if (n_dg == 1) dg_first = cyc;
      dg_last = cyc;
      u = real'(dg_ku) - 9.5; v = real'(dg_kv) - 9.5;
      X = (real'(cur_fp.x) + s * (u * $cos(ANG) - v * $sin(ANG)) + 0.5) / s0r;
      Y = (real'(cur_fp.y) + s * (u * $sin(ANG) + v * $cos(ANG)) + 0.5) / s0r;
      w = gauss(u, 3.3) * gauss(v, 3.3);
      dx = (16.0 * X + 3.0 * Y) * 256.0 * w; dy = (-5.0 * X + 7.0 * Y) * 256.0 * w;
      ex = dx * $cos(ANG) + dy * $sin(ANG); ey = dy * $cos(ANG) - dx * $sin(ANG);
      checks++;
      if (!close(real'(dg_rx), ex, 300000.0) || !close(real'(dg_ry), ey, 300000.0)) begin
        failures++; if (bad++ < 10) $display("dg sample s0=%0.0f (%0d,%0d): %0d %0d expected %f %f rd %0d %0d X %f %f", s0r, dg_ku, dg_kv, dg_rx, dg_ry, ex, ey, rd_x, rd_y, X, Y);
      end
    end
  end

  initial begin
    fp_valid = 0; fp_in = '0; frame_all = 0; og_cos = 32'sd56756; og_sin = 32'sd32768;
    foreach (rows_done[i]) rows_done[i] = 0;
    bad = 0; cyc = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (rows_done[i]) rows_done[i] = 12'd100;
    for (int p = 0; p < 4; p++) begin
      int lsz;
      lsz = (p == 0) ? 15 : (p == 1) ? 21 : (p == 2) ? 27 : 39;
      s = 2.0 * lsz / 15.0; s0r = real'(p + 2);
      n_og = 0; n_dg = 0;
      @(negedge clk);
      fp_in.x = 12'(100 + 13 * p); fp_in.y = 12'(60 + 7 * p); fp_in.fsize = 8'(lsz);
      fp_valid = 1;
      if (p == 3) begin
        // the rows of this point are not present yet: it must wait
        rows_done[3] = 12'd10;
        repeat (20) @(negedge clk);
        checks++;
        if (busy) begin failures++; $display("point started before its rows were present"); end
        rows_done[3] = 12'd100;
      end
      while (!fp_pop) @(negedge clk);
      @(negedge clk); fp_valid = 0;
      while (busy) @(negedge clk);
      checks++;
      if (n_og != 109 || n_dg != 400) begin failures++; $display("scale %0d: %0d/%0d samples", p + 2, n_og, n_dg); end
      checks++;
      if (og_last - og_first > 13 * 13 || dg_last - dg_first != 399) begin
        failures++; $display("sample rate: og %0d dg %0d clocks", og_last - og_first, dg_last - dg_first);
      end
    end
    checks++;
    if (!frac_seen) begin failures++; $display("no fractional sample position"); end
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
