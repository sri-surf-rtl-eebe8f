// tb_ci3_interp: drives 2000 random corner quadruples and fractions plus the
// corner cases fx, fy in {0, 0xFFFF}, and compares both outputs with the
// weighted sum of the four corners, weights (1-fx)(1-fy), fx(1-fy), (1-fx)fy,
// fx*fy over 2^32, kept to 8 fractional bits (floor).
module tb_ci3_interp;
  import surf_pkg::*;
  haar_t q [4];
  logic [15:0] fx, fy;
  logic signed [IVAL_W-1:0] dx, dy;
  int checks = 0, failures = 0;

  ci3_interp dut (.*);

  function automatic longint ref_v(longint a, longint b, longint c, longint d, longint x, longint y);
    longint s;
    s = a * (65536 - x) * (65536 - y) + b * x * (65536 - y) + c * (65536 - x) * y + d * x * y;
    return s >>> 24;
  endfunction

  initial begin
    for (int n = 0; n < 2004; n++) begin
      for (int k = 0; k < 4; k++) begin q[k].dx = 16'($urandom); q[k].dy = 16'($urandom); end
      fx = 16'($urandom); fy = 16'($urandom);
      if (n == 2000) begin fx = 0; fy = 0; end
      if (n == 2001) begin fx = 16'hFFFF; fy = 0; end
      if (n == 2002) begin fx = 0; fy = 16'hFFFF; end
      if (n == 2003) begin fx = 16'hFFFF; fy = 16'hFFFF; end
      #1;
      checks++;
      if (longint'(dx) != ref_v(q[0].dx, q[1].dx, q[2].dx, q[3].dx, fx, fy) ||
          longint'(dy) != ref_v(q[0].dy, q[1].dy, q[2].dy, q[3].dy, fx, fy)) begin
        failures++;
        $display("fx=%h fy=%h: got %0d %0d expected %0d %0d", fx, fy, dx, dy,
                 ref_v(q[0].dx, q[1].dx, q[2].dx, q[3].dx, fx, fy),
                 ref_v(q[0].dy, q[1].dy, q[2].dy, q[3].dy, fx, fy));
      end
      if (n == 2000) begin
        checks++;
        if (dx != IVAL_W'(q[0].dx) <<< 8) begin failures++; $display("integer position not exact"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
