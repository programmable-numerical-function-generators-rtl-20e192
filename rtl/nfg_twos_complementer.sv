// nfg_twos_complementer: applies the stored sign of c1_i to the product.
//
// The multiplier works on the magnitude |c1_i|; when the table's sign bit
// for the segment is set, this stage replaces the W-bit unsigned magnitude
// by its two's complement.  The result has W+1 bits so that every
// magnitude keeps its value.  One pipeline stage.  The unit and its place
// after the shifter follow the architecture; the widths are this
// implementation's own.
module nfg_twos_complementer #(
  parameter int unsigned W = nfg_pkg::DEF_Y_W + nfg_pkg::DEF_GUARD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W-1:0]      mag,
  input  logic              neg,
  output logic              out_valid,
  output logic signed [W:0] val
);

  logic signed [W:0] ext;
  assign ext = {1'b0, mag};

  always_ff @(posedge clk) begin
    val <= neg ? -ext : ext;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
