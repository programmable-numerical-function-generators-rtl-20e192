// nfg_output_adder: last adder, y = c1_i * (x - s_i) + (f(s_i) + v_i).
//
// Adds the signed product (P_W bits) and the table constant c0 = f(s_i)+v_i
// (A_W bits); both carry GUARD more fraction bits than the output.  The sum
// is rounded to the output format by adding half an output LSB and
// dropping the GUARD bits (round half up), and the low Y_W bits are kept;
// the generator's tables keep y inside the output range.  The rounding is
// this implementation's choice.  One pipeline stage.
module nfg_output_adder #(
  parameter int unsigned P_W   = nfg_pkg::DEF_Y_W + nfg_pkg::DEF_GUARD + 1,
  parameter int unsigned A_W   = nfg_pkg::DEF_Y_W + nfg_pkg::DEF_GUARD,
  parameter int unsigned GUARD = nfg_pkg::DEF_GUARD,
  parameter int unsigned Y_W   = nfg_pkg::DEF_Y_W,
  // derived, not to be overridden
  parameter int unsigned S_W   = ((P_W > A_W) ? P_W : A_W) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [P_W-1:0] prod,
  input  logic signed [A_W-1:0] c0,
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y
);

  if (GUARD < 1) begin : g_bad_guard
    $error("nfg_output_adder: GUARD must be at least 1");
  end

  logic signed [S_W-1:0] sum;
  logic signed [S_W-1:0] rounded;

  always_comb begin
    sum     = S_W'(prod) + S_W'(c0);
    rounded = (sum + (S_W'(1) <<< (GUARD - 1))) >>> GUARD;
  end

  always_ff @(posedge clk) begin
    y <= Y_W'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
