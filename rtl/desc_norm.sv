// desc_norm: normalises the 64-element descriptor to unit length. It sums the
// squares of the elements (one multiply per clock), takes the integer square
// root bit by bit, and divides every element by it with a shift-subtract
// divider (15 steps per element), giving signed Q1.15 values.
// Interface: 'start' latches 'vec_in'; 'done' pulses when 'vec_out' is valid.
// Timing: 64 + 52 + 64*17 clocks (about 1.2k) per descriptor. A zero vector
// gives zeros. Normalisation is a stage of the design; its serial,
// multiplier-light structure is this implementation's choice.
module desc_norm
  import surf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] vec_in [DESC_N],
  output logic                    busy,
  output logic                    done,
  output logic signed [DESC_W-1:0] vec_out [DESC_N]
);
  localparam int SQW = 2 * ACC_W + 8;      // sum of 64 squares
  localparam int RW  = SQW / 2;            // root width
  typedef enum logic [1:0] {N_IDLE, N_SQ, N_ROOT, N_DIV} nst_t;
  nst_t st;
  logic signed [ACC_W-1:0] v [DESC_N];
  logic [SQW-1:0] acc, rem_s;
  logic [RW-1:0]  root;
  logic [6:0] idx;
  logic [6:0] bitn;
  logic [ACC_W+15:0] rem_d;
  logic [15:0] quo;
  logic [4:0] dstep;

  logic [ACC_W-1:0] mag;
  assign mag = (v[idx[5:0]] < 0) ? ACC_W'(-v[idx[5:0]]) : ACC_W'(v[idx[5:0]]);
  assign busy = (st != N_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= N_IDLE; acc <= '0; rem_s <= '0; root <= '0; idx <= '0; bitn <= '0;
      rem_d <= '0; quo <= '0; dstep <= '0; done <= 1'b0;
      for (int i = 0; i < DESC_N; i++) begin v[i] <= '0; vec_out[i] <= '0; end
    end else begin
      done <= 1'b0;
      case (st)
        N_IDLE: if (start) begin
          for (int i = 0; i < DESC_N; i++) v[i] <= vec_in[i];
          acc <= '0; idx <= '0; st <= N_SQ;
        end
        N_SQ: begin
          acc <= acc + SQW'(mag) * SQW'(mag);
          idx <= idx + 1'b1;
          if (idx == 7'd63) begin
            st <= N_ROOT; root <= '0; rem_s <= '0; bitn <= 7'(RW - 1);
          end
        end
        N_ROOT: begin
          // restoring square root: try setting bit 'bitn' of the root
          logic [RW-1:0] trial;
          trial = root | (RW'(1) << bitn);
          if (SQW'(trial) * SQW'(trial) <= acc) root <= trial;
          if (bitn == 0) begin st <= N_DIV; idx <= '0; dstep <= '0; end
          else bitn <= bitn - 1'b1;
        end
        N_DIV: begin
          if (dstep == 0) begin
            rem_d <= (ACC_W+16)'(mag); quo <= '0; dstep <= 5'd1;
          end else if (dstep <= 5'd15) begin
            // one quotient bit per clock: quo = floor(|v| * 2^15 / root)
            logic [ACC_W+16:0] r2;
            r2 = {rem_d, 1'b0};
            if (r2 >= (ACC_W+17)'(root)) begin
              rem_d <= (ACC_W+16)'(r2 - (ACC_W+17)'(root)); quo <= {quo[14:0], 1'b1};
            end else begin
              rem_d <= (ACC_W+16)'(r2); quo <= {quo[14:0], 1'b0};
            end
            dstep <= dstep + 1'b1;
          end else begin
            logic [15:0] q;
            if (root == 0) q = '0;
            else if ((ACC_W+16)'(mag) >= (ACC_W+16)'(root)) q = 16'h7FFF;
            else q = quo;
            vec_out[idx[5:0]] <= (v[idx[5:0]] < 0) ? -$signed(q) : $signed(q);
            dstep <= '0;
            if (idx == 7'd63) begin st <= N_IDLE; done <= 1'b1; end
            else idx <= idx + 1'b1;
          end
        end
        default: st <= N_IDLE;
      endcase
    end
  end
endmodule
