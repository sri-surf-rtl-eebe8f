// fp_throttle: the second closed feedback loop. It counts the feature points
// a frame produced and the points lost because the feature-point queue was
// full. At the end of each frame it adjusts the Hessian threshold used for the
// next frame: a frame that lost points or produced more than TARGET raises
// the threshold by half (fewer points); a frame with fewer than TARGET/4
// points lowers it by a quarter, but never below THR_MIN.
// Timing: the new threshold is valid the clock after 'frame_done'.
// Reducing the points per frame by feedback is the design's; the counting
// rule, the factors and the TARGET default (3250 points per 1080p frame, the
// design's peak load) are this implementation's choices.
module fp_throttle
  import surf_pkg::*;
#(
  parameter int                    TARGET   = 3250,
  parameter logic signed [ACC_W-1:0] THR_INIT = 48'sd1703936,  // 26.0 in Q16
  parameter logic signed [ACC_W-1:0] THR_MIN  = 48'sd65536
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              fp_accept,    // one bit per detector
  input  logic [1:0]              fp_drop,      // one bit per detector
  input  logic                    frame_done,
  output logic signed [ACC_W-1:0] threshold,
  output logic [15:0]             last_count,
  output logic [15:0]             last_drops,
  output logic                    raised,       // pulses when the threshold went up
  output logic                    lowered
);
  logic [15:0] cnt, drops;
  logic [1:0] nd, na;
  assign nd = 2'(fp_drop[0]) + 2'(fp_drop[1]);
  assign na = 2'(fp_accept[0]) + 2'(fp_accept[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; drops <= '0; threshold <= THR_INIT;
      last_count <= '0; last_drops <= '0; raised <= 1'b0; lowered <= 1'b0;
    end else begin
      raised <= 1'b0; lowered <= 1'b0;
      if (frame_done) begin
        last_count <= cnt + 16'(na);
        last_drops <= drops + 16'(nd);
        cnt <= '0; drops <= '0;
        if (drops + 16'(nd) != 0 || 32'(cnt) + 32'(na) > TARGET) begin
          threshold <= threshold + (threshold >>> 1);
          raised <= 1'b1;
        end else if ((32'(cnt) + 32'(na)) * 4 < TARGET) begin
          threshold <= (threshold - (threshold >>> 2) < THR_MIN) ? THR_MIN
                                                                : threshold - (threshold >>> 2);
          lowered <= 1'b1;
        end
      end else begin
        cnt   <= cnt + 16'(na);
        drops <= drops + 16'(nd);
      end
    end
  end
endmodule
