// cordic: sequential CORDIC, 16 iterations, angles in radians with a 16-bit
// fraction (pi = 205887). mode 0 (vectoring): angle = atan2(y_in, x_in).
// mode 1 (rotation): cos_o/sin_o = cos/sin of angle_in, in Q16. Inputs
// outside the first/fourth quadrant are first turned by +-pi/2.
// Interface: 'start' pulse, 'done' pulses 18 clocks later with the results.
// Helper of the orientation generator (its ATAN step).
module cordic #(
  parameter int W = 52
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                mode,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [31:0]  angle_in,
  output logic                done,
  output logic signed [31:0]  angle_o,
  output logic signed [31:0]  cos_o,
  output logic signed [31:0]  sin_o
);
  localparam logic signed [31:0] HALF_PI = 32'sd102944;
  localparam logic signed [31:0] KINV    = 32'sd39797;
  function automatic logic signed [31:0] atan_tab(input logic [3:0] i);
    case (i)
      4'd0: return 32'sd51472;  4'd1: return 32'sd30386;  4'd2: return 32'sd16055;
      4'd3: return 32'sd8150;   4'd4: return 32'sd4091;   4'd5: return 32'sd2047;
      4'd6: return 32'sd1024;   4'd7: return 32'sd512;    4'd8: return 32'sd256;
      4'd9: return 32'sd128;    4'd10: return 32'sd64;    4'd11: return 32'sd32;
      4'd12: return 32'sd16;    4'd13: return 32'sd8;     4'd14: return 32'sd4;
      default: return 32'sd2;
    endcase
  endfunction

  logic signed [W+1:0] x, y;
  logic signed [31:0] z;
  logic [4:0] it;
  logic run, mode_q, fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; it <= '0; run <= 1'b0; mode_q <= 1'b0; done <= 1'b0; fin <= 1'b0;
      angle_o <= '0; cos_o <= '0; sin_o <= '0;
    end else begin
      done <= 1'b0;
      fin  <= run && (it == 5'd15);
      if (start && !run) begin
        run <= 1'b1; it <= '0; mode_q <= mode;
        if (!mode) begin
          if (x_in >= 0) begin x <= (W+2)'(x_in); y <= (W+2)'(y_in); z <= '0; end
          else if (y_in >= 0) begin x <= (W+2)'(y_in); y <= -(W+2)'(x_in); z <= HALF_PI; end
          else begin x <= -(W+2)'(y_in); y <= (W+2)'(x_in); z <= -HALF_PI; end
        end else begin
          if (angle_in > HALF_PI) begin x <= '0; y <= (W+2)'(KINV); z <= angle_in - HALF_PI; end
          else if (angle_in < -HALF_PI) begin x <= '0; y <= -(W+2)'(KINV); z <= angle_in + HALF_PI; end
          else begin x <= (W+2)'(KINV); y <= '0; z <= angle_in; end
        end
      end else if (run) begin
        logic dir;   // 1: rotate counter-clockwise
        dir = mode_q ? (z >= 0) : (y < 0);
        if (dir) begin
          x <= x - (y >>> it); y <= y + (x >>> it); z <= z - atan_tab(it[3:0]);
        end else begin
          x <= x + (y >>> it); y <= y - (x >>> it); z <= z + atan_tab(it[3:0]);
        end
        it <= it + 1'b1;
        if (it == 5'd15) run <= 1'b0;
      end
      if (fin) begin
        done    <= 1'b1;
        angle_o <= z;
        cos_o   <= 32'(x);
        sin_o   <= 32'(y);
      end
    end
  end
endmodule
