// tb_cdc_fifo: streams 300 random bytes from a 7 ns write clock to a 5 ns
// read clock with a reader that often stalls, and checks that every byte
// arrives once and in order, and that the write side was stalled (ready low)
// at least once while data were waiting.
module tb_cdc_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 1, rrst_n = 1;
  // reset by a falling edge, so that the asynchronous resets act before the first clock
  initial #1 {wrst_n, rrst_n} = '0;
  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;
  logic wvalid, wready, rvalid, rready;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0, stalls = 0;
  logic [7:0] ref_q [$];

  cdc_fifo #(.W(8), .DEPTH(16)) dut (.*);

  int nw = 0, nr = 0, rcyc = 0;
  initial begin
    wvalid = 0; wdata = 0; rready = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    while (nw < 300) begin
      @(negedge wclk);
      wvalid = 1; wdata = 8'($urandom);
      @(posedge wclk);
      while (!wready) begin stalls++; @(posedge wclk); end
      ref_q.push_back(wdata); nw++;
      #1 wvalid = 0;
    end
  end

  initial begin
    @(posedge rrst_n);
    while (nr < 300) begin
      @(negedge rclk);
      rcyc++;
      rready = (rcyc < 60) ? 1'b0 : ($urandom % 3 != 0);
      @(posedge rclk);
      if (rvalid && rready) begin
        checks++;
        if (ref_q.size() == 0 || rdata != ref_q[0]) begin
          failures++; $display("mismatch at %0d: got %h", nr, rdata);
        end
        if (ref_q.size() != 0) void'(ref_q.pop_front());
        nr++;
      end
    end
    checks++; if (stalls == 0) begin failures++; $display("write side never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
