// iig: integral image generator. Pixels arrive in raster order; each is added
// to a running row sum, and the row sum plus the integral value directly above
// gives II(r,c) = sum of all pixels at rows <= r and columns <= c. The last
// ROWS rows are held in a ring buffer that the Haar pre-computation and the
// feature detectors read through NRD independent combinational read ports.
// A read above row 0 or left of column 0 returns 0; a column past the right
// edge is clamped to the last column (no pixels are added there).
// Interface: pixel valid/ready; ready falls while 'hold' is high (image
// stall). 'row_done' pulses for one clock after the last pixel of row
// 'row_idx' has been written; 'frame_done' with the last row of the frame.
// The integral image is the design's; the ring buffer depth and read ports
// are this implementation's choices.
module iig
  import surf_pkg::*;
#(
  parameter int IMG_W = 1920,
  parameter int IMG_H = 1080,
  parameter int ROWS  = 64,
  parameter int NRD   = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  logic [PIX_W-1:0]        pix,
  input  logic                    hold,
  output logic                    row_done,
  output logic [11:0]             row_idx,
  output logic                    frame_done,
  output logic                    frame_start,   // high while the next pixel is the first of a frame
  input  logic signed [12:0]      rd_row [NRD],
  input  logic signed [12:0]      rd_col [NRD],
  output logic [II_W-1:0]         rd_data [NRD]
);
  localparam int RAW = $clog2(ROWS);
  logic [II_W-1:0] buf_q [ROWS][IMG_W];
  logic [11:0] x, y;
  logic [II_W-1:0] rowsum;
  logic [RAW-1:0] slot, slot_up;
  logic [II_W-1:0] above, iival;

  assign pix_ready   = !hold;
  assign frame_start = (x == 0) && (y == 0);
  assign slot        = RAW'(y % ROWS);
  assign slot_up     = RAW'((y + ROWS - 1) % ROWS);
  assign above       = (y == 0) ? '0 : buf_q[slot_up][x];
  assign iival       = rowsum + II_W'(pix) + above;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; rowsum <= '0;
      row_done <= 1'b0; row_idx <= '0; frame_done <= 1'b0;
    end else begin
      row_done   <= 1'b0;
      frame_done <= 1'b0;
      if (pix_valid && pix_ready) begin
        if (x == 12'(IMG_W - 1)) begin
          x <= '0; rowsum <= '0;
          row_done <= 1'b1; row_idx <= y;
          if (y == 12'(IMG_H - 1)) begin
            y <= '0; frame_done <= 1'b1;
          end else y <= y + 1'b1;
        end else begin
          x <= x + 1'b1;
          rowsum <= rowsum + II_W'(pix);
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (pix_valid && pix_ready) buf_q[slot][x] <= iival;

  // read ports
  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      logic signed [12:0] c;
      c = (rd_col[p] > 13'(IMG_W - 1)) ? 13'(IMG_W - 1) : rd_col[p];
      if (rd_row[p] < 0 || rd_col[p] < 0) rd_data[p] = '0;
      else rd_data[p] = buf_q[RAW'(32'(rd_row[p]) % ROWS)][c[11:0]];
    end
  end
endmodule
