// nfg_offset_adder: first adder of the datapath, d = x + (-s_i).
//
// The coefficients table stores the negated segment start -s_i, so the
// offset of x inside its segment is a plain addition.  x and -s_i are two's
// complement numbers with the same binary point; because s_i <= x inside
// the segment, the sum is non-negative and fits X_W unsigned bits, which is
// what the unsigned multiplier takes.  One pipeline stage: the sum is
// registered and out_valid follows in_valid by one cycle.  Storing -s_i and
// the single stage follow the architecture; keeping all X_W bits of the
// offset is this implementation's choice.
module nfg_offset_adder #(
  parameter int unsigned X_W = nfg_pkg::DEF_X_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x,
  input  logic signed [X_W-1:0] neg_s,
  output logic                  out_valid,
  output logic [X_W-1:0]        d
);

  always_ff @(posedge clk) begin
    d <= X_W'(x + neg_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
