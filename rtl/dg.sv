// dg: descriptor generator. The 20x20 samples of the square region around a
// feature point arrive with their Haar responses already turned into the
// point's orientation frame (rx along the orientation, ry across it) and
// Gaussian-weighted, together with their grid indices ku, kv (0..19). Each
// sample is added into its 5x5 sub-region (4x4 sub-regions), which keeps four
// sums: sum rx, sum ry, sum |rx|, sum |ry|. The 64 sums are the raw
// descriptor, element 4*(4*(kv/5) + ku/5) + {0,1,2,3}.
// Interface: 'clear' before a point, 'in_valid' per sample; 'vec' holds the
// sums and is complete the clock after the last sample. One sample per clock.
// The 4x4x4 layout follows the design; the ordering of the elements is this
// implementation's choice.
module dg
  import surf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic [4:0]              ku,
  input  logic [4:0]              kv,
  input  logic signed [ACC_W-1:0] rx,
  input  logic signed [ACC_W-1:0] ry,
  output logic signed [ACC_W-1:0] vec [DESC_N]
);
  logic [3:0] reg_i;
  assign reg_i = 4'((kv / 5) * 4 + (ku / 5));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DESC_N; i++) vec[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < DESC_N; i++) vec[i] <= '0;
    end else if (in_valid) begin
      vec[{reg_i, 2'd0}] <= vec[{reg_i, 2'd0}] + rx;
      vec[{reg_i, 2'd1}] <= vec[{reg_i, 2'd1}] + ry;
      vec[{reg_i, 2'd2}] <= vec[{reg_i, 2'd2}] + ((rx < 0) ? -rx : rx);
      vec[{reg_i, 2'd3}] <= vec[{reg_i, 2'd3}] + ((ry < 0) ? -ry : ry);
    end
  end
endmodule
