// nfg_multiplier: unsigned multiplier for |c1_i| * 2^-l_i * (x - s_i).
//
// The slope is kept as sign and magnitude, so the multiplier is unsigned:
// the C1_W-bit scaled magnitude times the D_W-bit segment offset gives the
// full C1_W + D_W bit product (its fraction bits are the sum of the two
// operands' fraction bits).  No bits are dropped here; the shifter or the
// alignment in the top decides which bits are kept.  One pipeline stage.
// The unsigned multiplier on the scaled magnitude follows the architecture;
// the operand widths are this implementation's choice.
module nfg_multiplier #(
  parameter int unsigned C1_W = nfg_pkg::DEF_C1_W,
  parameter int unsigned D_W  = nfg_pkg::DEF_X_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [C1_W-1:0]      c1_mag,
  input  logic [D_W-1:0]       d,
  output logic                 out_valid,
  output logic [C1_W+D_W-1:0]  prod
);

  always_ff @(posedge clk) begin
    prod <= (C1_W+D_W)'(c1_mag) * (C1_W+D_W)'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
