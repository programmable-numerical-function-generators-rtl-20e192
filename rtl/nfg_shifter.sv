// nfg_shifter: left shift by l_i of the scaling method, then alignment.
//
// A large slope is stored as c1_i * 2^-l_i, which needs fewer bits; the
// multiplier output is shifted left by l_i to restore c1_i * (x - s_i).
// The shifted product (IN_FRAC fraction bits) is then cut to the
// accumulation format: the low IN_FRAC - OUT_FRAC fraction bits are dropped
// (truncation) and OUT_W bits are kept.  The value is an unsigned
// magnitude; the generator's tables keep it below 2^(OUT_W-OUT_FRAC).
// Shifting before the truncation keeps the rounding error of the product
// independent of l_i.  One pipeline stage.  The left shift by l_i follows
// the architecture's scaling method; the truncation point and formats are
// this implementation's choice.
module nfg_shifter #(
  parameter int unsigned IN_W     = nfg_pkg::DEF_C1_W + nfg_pkg::DEF_X_W,
  parameter int unsigned IN_FRAC  = nfg_pkg::DEF_C1_FRAC + nfg_pkg::DEF_X_FRAC,
  parameter int unsigned L_W      = nfg_pkg::DEF_L_W,
  parameter int unsigned OUT_W    = nfg_pkg::DEF_Y_W + nfg_pkg::DEF_GUARD,
  parameter int unsigned OUT_FRAC = nfg_pkg::DEF_Y_FRAC + nfg_pkg::DEF_GUARD,
  // derived, not to be overridden
  parameter int unsigned WIDE_W   = IN_W + 2**L_W - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  prod,
  input  logic [L_W-1:0]   shl,
  output logic             out_valid,
  output logic [OUT_W-1:0] mag
);

  if (IN_FRAC < OUT_FRAC) begin : g_bad_frac
    $error("nfg_shifter: IN_FRAC must not be smaller than OUT_FRAC");
  end

  logic [WIDE_W-1:0] wide;

  always_comb begin
    wide = WIDE_W'(prod) << shl;
  end

  always_ff @(posedge clk) begin
    mag <= OUT_W'(wide >> (IN_FRAC - OUT_FRAC));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
