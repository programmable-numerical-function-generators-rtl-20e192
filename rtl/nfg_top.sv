// nfg_top: programmable numerical function generator (non-uniform segments).
//
// Computes y ~= f(x) by a piecewise linear approximation whose segments
// need not be of equal width:  y = c1_i * (x - s_i) + (f(s_i) + v_i), where
// [s_i, s_{i+1}) is the segment holding x, c1_i the slope of the chord of f
// over the segment and v_i the correction that centres the error.  Which f
// is computed depends only on the table contents, which are written through
// the cfg_* port; the datapath is the same for every function.
//
// Units, each followed by pipeline registers:
//   1. segment index encoder: LUT cascade, N_CAS stages (x -> i)
//   2. coefficients table: 1 stage (i -> -s_i, sign, l_i, |c1_i|*2^-l_i, c0)
//   3. offset adder x + (-s_i): 1 stage
//   4. unsigned multiplier |c1_i|*2^-l_i * (x - s_i): 1 stage
//   5. shifter << l_i: 1 stage, present when USE_SHIFT
//   6. two's complementer for negative c1_i: 1 stage, present when USE_SIGN
//   7. output adder + c0, rounding: 1 stage
// so the latency is N_CAS+4 to N_CAS+6 cycles (nfg_pkg::nfg_latency) and
// one result leaves per cycle.  With USE_SHIFT = 0 the shifter is left out
// and the product is only aligned; the tables must then hold l_i = 0.
// With USE_SIGN = 0 all slopes must be non-negative.
//
// The unit list, the stage counts, sign-magnitude slopes and the scaling
// shift follow the architecture.  The table write port, the word widths,
// the rounding of the output and the absence of stalls are this
// implementation's choices.
//
// Interface: in_valid/x in; out_valid/y out, latency LATENCY cycles.
// Configuration: cfg_sel = k < N_CAS writes LUT k of the cascade (address
// {rails, x bits}, data = rails), cfg_sel = N_CAS writes the coefficients
// table (address = segment index, data = packed coefficient word).  Tables
// should be written while no x is in flight.
module nfg_top #(
  parameter int unsigned X_W       = nfg_pkg::DEF_X_W,
  parameter int unsigned X_FRAC    = nfg_pkg::DEF_X_FRAC,
  parameter int unsigned SEG_W     = nfg_pkg::DEF_SEG_W,
  parameter int unsigned N_CAS     = nfg_pkg::DEF_N_CAS,
  parameter int unsigned FIRST_W   = nfg_pkg::DEF_FIRST_W,
  parameter int unsigned C1_W      = nfg_pkg::DEF_C1_W,
  parameter int unsigned C1_FRAC   = nfg_pkg::DEF_C1_FRAC,
  parameter int unsigned L_W       = nfg_pkg::DEF_L_W,
  parameter int unsigned Y_W       = nfg_pkg::DEF_Y_W,
  parameter int unsigned Y_FRAC    = nfg_pkg::DEF_Y_FRAC,
  parameter int unsigned GUARD     = nfg_pkg::DEF_GUARD,
  parameter bit          USE_SHIFT = 1'b1,
  parameter bit          USE_SIGN  = 1'b1,
  // derived, not to be overridden
  parameter int unsigned REST_W    = (X_W - FIRST_W) / (N_CAS - 1),
  parameter int unsigned A_W       = Y_W + GUARD,
  parameter int unsigned WORD_W    = X_W + 1 + L_W + C1_W + A_W,
  parameter int unsigned CFG_A_W   = (SEG_W + REST_W > SEG_W) ? SEG_W + REST_W : SEG_W,
  parameter int unsigned CFG_D_W   = (WORD_W > SEG_W) ? WORD_W : SEG_W,
  parameter int unsigned SEL_W     = $clog2(N_CAS + 1),
  parameter int unsigned LATENCY   = nfg_pkg::nfg_latency(N_CAS, USE_SHIFT, USE_SIGN)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x,
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y,
  // configuration (table loading) port
  input  logic                  cfg_we,
  input  logic [SEL_W-1:0]      cfg_sel,
  input  logic [CFG_A_W-1:0]    cfg_addr,
  input  logic [CFG_D_W-1:0]    cfg_data
);

  localparam int unsigned P_W    = C1_W + X_W;             // product width
  localparam int unsigned P_FRAC = C1_FRAC + X_FRAC;       // product fraction
  localparam int unsigned A_FRAC = Y_FRAC + GUARD;         // accumulation fraction

  if (P_FRAC < A_FRAC) begin : g_bad_frac
    $error("nfg_top: C1_FRAC + X_FRAC must be at least Y_FRAC + GUARD");
  end

  // fields that travel beside the datapath after the coefficients table
  typedef struct packed {
    logic                  neg;
    logic [L_W-1:0]        shl;
    logic signed [A_W-1:0] c0;
  } side_t;

  // ---------------------------------------------------------------- 1
  localparam int unsigned LUT_SEL_W = $clog2(N_CAS);

  logic                 cas_valid;
  logic [SEG_W-1:0]     seg_idx;
  logic [LUT_SEL_W-1:0] cfg_lut;
  assign cfg_lut = cfg_sel[LUT_SEL_W-1:0];

  nfg_lut_cascade #(
    .X_W(X_W), .N_CAS(N_CAS), .FIRST_W(FIRST_W), .R(SEG_W)
  ) u_cascade (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .x         (x),
    .out_valid (cas_valid),
    .seg_idx   (seg_idx),
    .cfg_we    (cfg_we && cfg_sel < SEL_W'(N_CAS)),
    .cfg_lut   (cfg_lut),
    .cfg_addr  (cfg_addr[SEG_W+REST_W-1:0]),
    .cfg_data  (cfg_data[SEG_W-1:0])
  );

  // x waits for the cascade and the coefficients table
  logic signed [X_W-1:0] x_d [N_CAS+2];
  assign x_d[0] = x;
  for (genvar k = 1; k <= N_CAS + 1; k++) begin : g_xdelay
    always_ff @(posedge clk) x_d[k] <= x_d[k-1];
  end

  // ---------------------------------------------------------------- 2
  logic                  tab_valid;
  logic signed [X_W-1:0] neg_s;
  logic [C1_W-1:0]       c1_mag;
  side_t                 side_tab;

  nfg_coef_table #(
    .SEG_W(SEG_W), .X_W(X_W), .C1_W(C1_W), .L_W(L_W), .A_W(A_W)
  ) u_coef (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cas_valid),
    .seg_idx   (seg_idx),
    .out_valid (tab_valid),
    .neg_s     (neg_s),
    .c1_neg    (side_tab.neg),
    .c1_shl    (side_tab.shl),
    .c1_mag    (c1_mag),
    .c0        (side_tab.c0),
    .cfg_we    (cfg_we && cfg_sel == SEL_W'(N_CAS)),
    .cfg_addr  (cfg_addr[SEG_W-1:0]),
    .cfg_data  (cfg_data[WORD_W-1:0])
  );

  // ---------------------------------------------------------------- 3
  logic            off_valid;
  logic [X_W-1:0]  d;
  logic [C1_W-1:0] c1_mag_q;
  side_t           side_off;

  nfg_offset_adder #(.X_W(X_W)) u_offset (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tab_valid),
    .x         (x_d[N_CAS+1]),
    .neg_s     (neg_s),
    .out_valid (off_valid),
    .d         (d)
  );

  always_ff @(posedge clk) begin
    c1_mag_q <= c1_mag;
    side_off <= side_tab;
  end

  // ---------------------------------------------------------------- 4
  logic           mul_valid;
  logic [P_W-1:0] prod;
  side_t          side_mul;

  nfg_multiplier #(.C1_W(C1_W), .D_W(X_W)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (off_valid),
    .c1_mag    (c1_mag_q),
    .d         (d),
    .out_valid (mul_valid),
    .prod      (prod)
  );

  always_ff @(posedge clk) side_mul <= side_off;

  // ---------------------------------------------------------------- 5
  logic           shf_valid;
  logic [A_W-1:0] mag;
  side_t          side_shf;

  if (USE_SHIFT) begin : g_shift
    nfg_shifter #(
      .IN_W(P_W), .IN_FRAC(P_FRAC), .L_W(L_W), .OUT_W(A_W), .OUT_FRAC(A_FRAC)
    ) u_shift (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (mul_valid),
      .prod      (prod),
      .shl       (side_mul.shl),
      .out_valid (shf_valid),
      .mag       (mag)
    );
    always_ff @(posedge clk) side_shf <= side_mul;
  end else begin : g_noshift
    // no shifter: only drop the surplus fraction bits of the product
    assign shf_valid = mul_valid;
    assign mag       = A_W'(prod >> (P_FRAC - A_FRAC));
    assign side_shf  = side_mul;
  end

  // ---------------------------------------------------------------- 6
  logic                  sgn_valid;
  logic signed [A_W:0]   term;
  logic signed [A_W-1:0] c0_sgn;

  if (USE_SIGN) begin : g_sign
    nfg_twos_complementer #(.W(A_W)) u_neg (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (shf_valid),
      .mag       (mag),
      .neg       (side_shf.neg),
      .out_valid (sgn_valid),
      .val       (term)
    );
    always_ff @(posedge clk) c0_sgn <= side_shf.c0;
  end else begin : g_nosign
    // all slopes non-negative: the magnitude is the product
    assign sgn_valid = shf_valid;
    assign term      = {1'b0, mag};
    assign c0_sgn    = side_shf.c0;
  end

  // ---------------------------------------------------------------- 7
  nfg_output_adder #(
    .P_W(A_W + 1), .A_W(A_W), .GUARD(GUARD), .Y_W(Y_W)
  ) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (sgn_valid),
    .prod      (term),
    .c0        (c0_sgn),
    .out_valid (out_valid),
    .y         (y)
  );

  // configuration writes go to an existing table
  a_cfg_sel: assert property (@(posedge clk) disable iff (!rst_n)
                              cfg_we |-> cfg_sel <= SEL_W'(N_CAS))
    else $error("nfg_top: cfg_sel %0d selects no table", cfg_sel);

endmodule
