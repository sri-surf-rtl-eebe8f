// haar_pre: pre-computes the Haar wavelet pair (dx, dy) at the integer points
// of a scaled grid, so that later sampling needs only four stored values per
// sample (the compromise interpolation, CI3). For rounded scale s0 the grid
// point (X, Y) covers pixel rows Y*s0-s0 .. Y*s0+s0-1 and columns
// X*s0-s0 .. X*s0+s0-1: dx = right half - left half, dy = lower half - upper
// half of that 2*s0 square, each half taken as four integral-image corners.
// One task computes one scaled row: 'start' with s0 and Y, then one grid point
// per clock is read from the integral image (eight read ports) and written to
// the scaled RAM selected by 'wr_sidx'. 'busy' stays high until the row is done.
// Latency: IMG_W/s0 + 1 clocks per row. Pre-computing at integer points is the
// design's; the exact wavelet placement is this implementation's choice.
module haar_pre
  import surf_pkg::*;
#(
  parameter int IMG_W = 1920
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [2:0]          s0,
  input  logic [11:0]         row_y,
  output logic                busy,
  output logic signed [12:0]  rd_row [8],
  output logic signed [12:0]  rd_col [8],
  input  logic [II_W-1:0]     rd_data [8],
  output logic                wr_en,
  output logic [1:0]          wr_sidx,
  output logic [11:0]         wr_x,
  output logic [11:0]         wr_y,
  output haar_t               wr_data
);
  logic [2:0]  s0_q;
  logic [11:0] y_q, x_q;
  logic signed [12:0] ra, rm, rb, ca, cm, cb;

  logic [11:0] nx_s;
  always_comb begin
    case (s0_q)
      3'd2: nx_s = 12'(IMG_W / 2);
      3'd3: nx_s = 12'(IMG_W / 3);
      3'd4: nx_s = 12'(IMG_W / 4);
      default: nx_s = 12'(IMG_W / 5);
    endcase
  end

  always_comb begin
    logic signed [12:0] s, yc, xc;
    s  = 13'(s0_q);
    yc = 13'(y_q * s0_q);
    xc = 13'(x_q * s0_q);
    ra = yc - s - 13'sd1; rm = yc - 13'sd1; rb = yc + s - 13'sd1;
    ca = xc - s - 13'sd1; cm = xc - 13'sd1; cb = xc + s - 13'sd1;
    // ports: 0 (rb,cb) 1 (ra,cb) 2 (rb,cm) 3 (ra,cm) 4 (rb,ca) 5 (ra,ca) 6 (rm,cb) 7 (rm,ca)
    rd_row[0] = rb; rd_col[0] = cb;
    rd_row[1] = ra; rd_col[1] = cb;
    rd_row[2] = rb; rd_col[2] = cm;
    rd_row[3] = ra; rd_col[3] = cm;
    rd_row[4] = rb; rd_col[4] = ca;
    rd_row[5] = ra; rd_col[5] = ca;
    rd_row[6] = rm; rd_col[6] = cb;
    rd_row[7] = rm; rd_col[7] = ca;
  end

  logic signed [II_W:0] rbox, lbox, bbox, tbox;
  always_comb begin
    rbox = $signed({1'b0, rd_data[0]}) - $signed({1'b0, rd_data[1]})
         - $signed({1'b0, rd_data[2]}) + $signed({1'b0, rd_data[3]});
    lbox = $signed({1'b0, rd_data[2]}) - $signed({1'b0, rd_data[3]})
         - $signed({1'b0, rd_data[4]}) + $signed({1'b0, rd_data[5]});
    bbox = $signed({1'b0, rd_data[0]}) - $signed({1'b0, rd_data[6]})
         - $signed({1'b0, rd_data[4]}) + $signed({1'b0, rd_data[7]});
    tbox = $signed({1'b0, rd_data[6]}) - $signed({1'b0, rd_data[1]})
         - $signed({1'b0, rd_data[7]}) + $signed({1'b0, rd_data[5]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; s0_q <= 3'd2; y_q <= '0; x_q <= '0;
      wr_en <= 1'b0; wr_sidx <= '0; wr_x <= '0; wr_y <= '0; wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; s0_q <= s0; y_q <= row_y; x_q <= '0;
        end
      end else begin
        wr_en      <= 1'b1;
        wr_sidx    <= 2'(s0_q - 3'd2);
        wr_x       <= x_q;
        wr_y       <= y_q;
        wr_data.dx <= HAAR_W'(rbox - lbox);
        wr_data.dy <= HAAR_W'(bbox - tbox);
        if (x_q == nx_s - 1'b1) busy <= 1'b0;
        else x_q <= x_q + 1'b1;
      end
    end
  end
endmodule
