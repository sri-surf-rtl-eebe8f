// cdc_fifo: asynchronous FIFO that carries pixels from the I/O clock domain to
// the calculation clock domain. Read and write pointers cross the clock
// boundary in Gray code through two-flop synchronisers. The write side's
// ready (not full) is the first closed feedback loop of the design: when the
// calculation side stops taking pixels, the FIFO fills and image reading is
// stalled. The dual clock domain is the design's; the Gray-code FIFO is this
// implementation's choice.
// Interface: valid/ready on both sides; DEPTH must be a power of two.
// Latency: a written word becomes visible on the read side 2-3 read clocks later.
module cdc_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wvalid,
  output logic         wready,
  input  logic [W-1:0] wdata,
  input  logic         rclk,
  input  logic         rrst_n,
  output logic         rvalid,
  input  logic         rready,
  output logic [W-1:0] rdata
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_nx;
  assign wready  = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx = wbin + ((wvalid && wready) ? 1'b1 : 1'b0);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_nx; wgray <= b2g(wbin_nx);
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk)
    if (wvalid && wready) mem[wbin[AW-1:0]] <= wdata;

  // read side
  logic [AW:0] rbin_nx;
  assign rvalid  = (rgray != wgray_r2);
  assign rdata   = mem[rbin[AW-1:0]];
  assign rbin_nx = rbin + ((rvalid && rready) ? 1'b1 : 1'b0);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_nx; rgray <= b2g(rbin_nx);
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
  end
endmodule
