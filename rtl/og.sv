// og: orientation generator. The Gaussian-weighted Haar responses (dx, dy) of
// the samples around a feature point are streamed in; each is classified into
// one of 36 angular sectors of 10 degrees by sign tests and comparisons
// |dy|*cos(t) > |dx|*sin(t) at t = 10..80 degrees, and summed per sector.
// After 'finish', a 60-degree window (six sectors) slides over the 36 start
// positions; the window with the largest squared vector sum wins, and its
// direction, atan2(sum dy, sum dx), is the orientation. A CORDIC gives the
// angle and then its cosine and sine for the descriptor stage.
// Interface: 'clear' before a point, 'in_valid' per sample, 'finish' after the
// last; 'done' pulses with angle (radians, Q16), cos and sin (Q16).
// Timing: 36 clocks of window search plus two 18-clock CORDIC runs.
// The sliding window and a single ATAN per point follow the design (36
// comparisons per point); quantising sample directions to 10-degree sectors
// is this implementation's simplification of the per-sample angle.
module og
  import surf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] in_dx,
  input  logic signed [ACC_W-1:0] in_dy,
  input  logic                    finish,
  output logic                    busy,
  output logic                    done,
  output logic signed [31:0]      angle,
  output logic signed [31:0]      cos_o,
  output logic signed [31:0]      sin_o
);
  localparam int NSEC = 36;
  logic signed [ACC_W-1:0] sec_x [NSEC];
  logic signed [ACC_W-1:0] sec_y [NSEC];

  // sector of the incoming sample
  function automatic logic [16:0] cos_t(input int j);
    case (j)
      1: return 17'd64540; 2: return 17'd61584; 3: return 17'd56756; 4: return 17'd50203;
      5: return 17'd42126; 6: return 17'd32768; 7: return 17'd22415; default: return 17'd11380;
    endcase
  endfunction
  function automatic logic [16:0] sin_t(input int j);
    case (j)
      1: return 17'd11380; 2: return 17'd22415; 3: return 17'd32768; 4: return 17'd42126;
      5: return 17'd50203; 6: return 17'd56756; 7: return 17'd61584; default: return 17'd64540;
    endcase
  endfunction
  logic [5:0] sec;
  always_comb begin
    logic signed [ACC_W-1:0] ax, ay;
    int j;
    ax = (in_dx < 0) ? -in_dx : in_dx;
    ay = (in_dy < 0) ? -in_dy : in_dy;
    j = 0;
    for (int t = 1; t <= 8; t++)
      if ((72'(ay) * 72'(cos_t(t))) > (72'(ax) * 72'(sin_t(t)))) j = t;
    if (in_dx >= 0 && in_dy >= 0)     sec = 6'(j);
    else if (in_dx < 0 && in_dy >= 0) sec = 6'(17 - j);
    else if (in_dx < 0)               sec = 6'(18 + j);
    else                              sec = 6'(35 - j);
  end

  typedef enum logic [2:0] {O_IDLE, O_WIN, O_ATAN, O_WAIT_A, O_ROT, O_WAIT_R} ost_t;
  ost_t st;
  logic [5:0] k;
  logic signed [ACC_W+3:0] best_x, best_y;
  logic [103:0] best_m;
  logic signed [ACC_W+3:0] wx, wy;
  logic [103:0] wm;
  always_comb begin
    wx = '0; wy = '0;
    for (int i = 0; i < 6; i++) begin
      wx = wx + (ACC_W+4)'(sec_x[(int'(k) + i) % NSEC]);
      wy = wy + (ACC_W+4)'(sec_y[(int'(k) + i) % NSEC]);
    end
    wm = 104'($signed(104'(wx)) * $signed(104'(wx))) + 104'($signed(104'(wy)) * $signed(104'(wy)));
  end

  logic c_start, c_mode, c_done;
  logic signed [31:0] c_ang, c_cos, c_sin;
  cordic #(.W(ACC_W+4)) u_cordic (
    .clk, .rst_n, .start(c_start), .mode(c_mode), .x_in(best_x), .y_in(best_y),
    .angle_in(angle), .done(c_done), .angle_o(c_ang), .cos_o(c_cos), .sin_o(c_sin));

  assign busy = (st != O_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= O_IDLE; k <= '0; best_x <= '0; best_y <= '0; best_m <= '0;
      done <= 1'b0; angle <= '0; cos_o <= '0; sin_o <= '0; c_start <= 1'b0; c_mode <= 1'b0;
      for (int i = 0; i < NSEC; i++) begin sec_x[i] <= '0; sec_y[i] <= '0; end
    end else begin
      done <= 1'b0; c_start <= 1'b0;
      if (clear) begin
        for (int i = 0; i < NSEC; i++) begin sec_x[i] <= '0; sec_y[i] <= '0; end
      end else if (in_valid) begin
        sec_x[sec] <= sec_x[sec] + in_dx;
        sec_y[sec] <= sec_y[sec] + in_dy;
      end
      case (st)
        O_IDLE: if (finish) begin st <= O_WIN; k <= '0; best_m <= '0; best_x <= '0; best_y <= '0; end
        O_WIN: begin
          if (wm > best_m || k == 0) begin best_m <= wm; best_x <= wx; best_y <= wy; end
          if (k == 6'(NSEC - 1)) st <= O_ATAN;
          k <= k + 1'b1;
        end
        O_ATAN:   begin c_start <= 1'b1; c_mode <= 1'b0; st <= O_WAIT_A; end
        O_WAIT_A: if (c_done) begin angle <= c_ang; st <= O_ROT; end
        O_ROT:    begin c_start <= 1'b1; c_mode <= 1'b1; st <= O_WAIT_R; end
        O_WAIT_R: if (c_done) begin cos_o <= c_cos; sin_o <= c_sin; done <= 1'b1; st <= O_IDLE; end
        default:  st <= O_IDLE;
      endcase
    end
  end
endmodule
