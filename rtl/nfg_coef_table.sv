// nfg_coef_table: coefficients table of the generator, one word per segment.
//
// For segment i it holds everything the datapath needs to evaluate
//   y = c1_i * (x - s_i) + (f(s_i) + v_i):
//   neg_s  -s_i, the negated segment start, in the input format of x
//   c1_neg sign of the slope c1_i (the slope is kept as sign + magnitude)
//   c1_shl l_i, the left shift of the scaling method
//   c1_mag |c1_i| * 2^-l_i, unsigned, C1_W bits with C1_FRAC fraction bits
//   c0     f(s_i) + v_i, two's complement, A_W bits with A_FRAC fraction bits
// The word is packed as {neg_s, c1_neg, c1_shl, c1_mag, c0}, MSB first, on
// the configuration port.  The table is a synchronous memory block: seg_idx
// presented with in_valid in one cycle gives the fields with out_valid in
// the next.  Storing -s_i, the sign and the shift follows the architecture;
// the field widths and the packing order are this implementation's own.
module nfg_coef_table #(
  parameter int unsigned SEG_W  = nfg_pkg::DEF_SEG_W,
  parameter int unsigned X_W    = nfg_pkg::DEF_X_W,
  parameter int unsigned C1_W   = nfg_pkg::DEF_C1_W,
  parameter int unsigned L_W    = nfg_pkg::DEF_L_W,
  parameter int unsigned A_W    = nfg_pkg::DEF_Y_W + nfg_pkg::DEF_GUARD,
  // derived, not to be overridden
  parameter int unsigned WORD_W = X_W + 1 + L_W + C1_W + A_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [SEG_W-1:0]      seg_idx,
  output logic                  out_valid,
  output logic signed [X_W-1:0] neg_s,
  output logic                  c1_neg,
  output logic [L_W-1:0]        c1_shl,
  output logic [C1_W-1:0]       c1_mag,
  output logic signed [A_W-1:0] c0,
  // configuration (table loading) port
  input  logic                  cfg_we,
  input  logic [SEG_W-1:0]      cfg_addr,
  input  logic [WORD_W-1:0]     cfg_data
);

  typedef struct packed {
    logic [X_W-1:0]  neg_s;
    logic            c1_neg;
    logic [L_W-1:0]  c1_shl;
    logic [C1_W-1:0] c1_mag;
    logic [A_W-1:0]  c0;
  } coef_t;

  coef_t word;

  nfg_sync_mem #(.ADDR_W(SEG_W), .DATA_W(WORD_W)) u_rom (
    .clk     (clk),
    .rd_en   (in_valid),
    .rd_addr (seg_idx),
    .rd_data (word),
    .wr_en   (cfg_we),
    .wr_addr (cfg_addr),
    .wr_data (cfg_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  assign neg_s  = word.neg_s;
  assign c1_neg = word.c1_neg;
  assign c1_shl = word.c1_shl;
  assign c1_mag = word.c1_mag;
  assign c0     = word.c0;

endmodule
