// msr_ram: one scaled RAM of the multi-scaled RAM (MSR). It keeps, for one
// rounded scale s0, the pre-computed Haar pairs of the scaled grid (one entry
// per s0 x s0 pixels) for the last ROWS scaled rows, as a ring indexed by the
// scaled row number modulo ROWS. With the scale normalised away, every
// feature point of this scale sees the same access pattern. The read port
// returns the four grid neighbours (X,Y), (X+1,Y), (X,Y+1), (X+1,Y+1) of a
// sample in the same clock; a neighbour outside the image or not yet written
// reads as zero. 'rows_done' counts scaled rows written since 'clear'.
// ROWS = 16 + 2*34 = 84 and the 1/s0 row width follow the design; the ring
// organisation and the zero fill are this implementation's choices.
module msr_ram
  import surf_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int S0    = 2,
  parameter int ROWS  = 84
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               wr_en,
  input  logic [11:0]        wr_x,
  input  logic [11:0]        wr_y,
  input  haar_t              wr_data,
  input  logic signed [12:0] rd_x,
  input  logic signed [12:0] rd_y,
  output haar_t              rd_q [4],   // (X,Y) (X+1,Y) (X,Y+1) (X+1,Y+1)
  output logic [11:0]        rows_done
);
  localparam int NX = IMG_W / S0;
  haar_t mem [ROWS][NX];

  always_ff @(posedge clk)
    if (wr_en) mem[32'(wr_y) % ROWS][wr_x] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rows_done <= '0;
    else if (clear) rows_done <= '0;
    else if (wr_en && wr_x == 12'(NX - 1)) rows_done <= wr_y + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      logic signed [13:0] xx, yy;
      xx = 14'(rd_x) + 14'(k & 1);
      yy = 14'(rd_y) + 14'(k >> 1);
      if (xx < 0 || xx >= 14'(NX) || yy < 0 || yy >= $signed({2'b0, rows_done})
          || yy + 14'(ROWS) < $signed({2'b0, rows_done}))
        rd_q[k] = '0;
      else
        rd_q[k] = mem[32'(yy) % ROWS][xx[11:0]];
    end
  end
endmodule
