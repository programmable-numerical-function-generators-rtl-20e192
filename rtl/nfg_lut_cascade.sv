// nfg_lut_cascade: segment index encoder realised as a pipelined LUT cascade.
//
// It computes seg_func(x), the index i of the segment [s_i, s_{i+1}) that
// holds x.  The cascade is a chain of N_CAS look-up tables, each a
// synchronous memory block.  LUT 0 is addressed by the FIRST_W least
// significant bits of x; LUT k (k > 0) is addressed by the "rails" produced
// by LUT k-1 together with the next REST_W bits of x, so the most
// significant bits of x enter the last LUT, whose rails are the segment
// index.  Each LUT adds one pipeline stage, and the bits of x that later
// LUTs use are delayed to meet their rails.
//
// Content encoding (this implementation's choice; the tables are written
// through the cfg_* port): with the sign bit of x inverted, so that bit
// order is numeric order, let rank_K(x) be the number of segment boundaries
// s_1..s_{t-1} whose low K bits are <= the low K bits of x.  The next LUT
// can form rank_{K+REST_W} from rank_K and its own bits, and for all bits
// the rank is the segment index.  Inner LUTs do not pass the rank itself but
// a dense code for it: after K bits there are at most 2^K distinct ranks,
// so the rails after LUT k are RAIL_W(k) = min(K, R) bits wide, and only the
// last LUT outputs all R bits.  Ranks never exceed t-1, so R = ceil(log2 t)
// rails suffice, within the rail bound for segment index functions.
// Narrow early rails keep the first LUTs small, in the spirit of the
// compact cascades the architecture calls for; uniform x-bit groups after
// the first LUT are this implementation's simplification.
//
// Interface: in_valid/x enter in cycle 0; out_valid/seg_idx leave N_CAS
// cycles later.  One new x per clock, no stalls.  cfg_lut selects the LUT a
// configuration write goes to; cfg_addr is {rails, x bits} of that LUT,
// right-aligned to its address width (only the low FIRST_W bits for LUT 0),
// and cfg_data the rail code, right-aligned to RAIL_W(k).
module nfg_lut_cascade #(
  parameter int unsigned X_W     = nfg_pkg::DEF_X_W,
  parameter int unsigned N_CAS   = nfg_pkg::DEF_N_CAS,
  parameter int unsigned FIRST_W = nfg_pkg::DEF_FIRST_W,
  parameter int unsigned R       = nfg_pkg::DEF_SEG_W,
  // derived, not to be overridden
  parameter int unsigned REST_W  = (X_W - FIRST_W) / (N_CAS - 1),
  parameter int unsigned CFG_A_W = R + REST_W,
  parameter int unsigned SEL_W   = $clog2(N_CAS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [X_W-1:0]     x,
  output logic               out_valid,
  output logic [R-1:0]       seg_idx,
  // configuration (table loading) port
  input  logic               cfg_we,
  input  logic [SEL_W-1:0]   cfg_lut,
  input  logic [CFG_A_W-1:0] cfg_addr,
  input  logic [R-1:0]       cfg_data
);

  // width of the rails leaving LUT k
  function automatic int unsigned rail_w(int unsigned k);
    int unsigned kb;
    kb = FIRST_W + k * REST_W;
    if (k == N_CAS - 1 || kb > R) return R;
    return kb;
  endfunction

  if (N_CAS < 2 || FIRST_W + (N_CAS - 1) * REST_W != X_W) begin : g_bad_split
    $error("nfg_lut_cascade: X_W - FIRST_W must split evenly over N_CAS-1 LUTs");
  end

  // x_d[k]: x delayed by k cycles; v_d[k]: valid delayed by k cycles
  logic [X_W-1:0] x_d [N_CAS];
  logic [N_CAS:0] v_d;
  logic [R-1:0]   rails [N_CAS];

  assign x_d[0] = x;
  assign v_d[0] = in_valid;

  for (genvar k = 1; k < N_CAS; k++) begin : g_xdelay
    always_ff @(posedge clk) x_d[k] <= x_d[k-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_d[N_CAS:1] <= '0;
    else        v_d[N_CAS:1] <= v_d[N_CAS-1:0];
  end

  // LUT 0: addressed by the FIRST_W least significant bits of x
  logic [rail_w(0)-1:0] q0;

  nfg_sync_mem #(.ADDR_W(FIRST_W), .DATA_W(rail_w(0))) u_lut0 (
    .clk     (clk),
    .rd_en   (v_d[0]),
    .rd_addr (x_d[0][FIRST_W-1:0]),
    .rd_data (q0),
    .wr_en   (cfg_we && cfg_lut == SEL_W'(0)),
    .wr_addr (cfg_addr[FIRST_W-1:0]),
    .wr_data (cfg_data[rail_w(0)-1:0])
  );
  assign rails[0] = R'(q0);

  // LUT k: addressed by the rails of LUT k-1 and the next REST_W bits of x
  for (genvar k = 1; k < N_CAS; k++) begin : g_lut
    localparam int unsigned IN_R  = rail_w(k - 1);
    localparam int unsigned OUT_R = rail_w(k);
    logic [IN_R+REST_W-1:0] addr;
    logic [OUT_R-1:0]       q;
    assign addr = {rails[k-1][IN_R-1:0], x_d[k][FIRST_W+(k-1)*REST_W +: REST_W]};

    nfg_sync_mem #(.ADDR_W(IN_R + REST_W), .DATA_W(OUT_R)) u_lut (
      .clk     (clk),
      .rd_en   (v_d[k]),
      .rd_addr (addr),
      .rd_data (q),
      .wr_en   (cfg_we && cfg_lut == SEL_W'(k)),
      .wr_addr (cfg_addr[IN_R+REST_W-1:0]),
      .wr_data (cfg_data[OUT_R-1:0])
    );
    assign rails[k] = R'(q);
  end

  assign seg_idx   = rails[N_CAS-1];
  assign out_valid = v_d[N_CAS];

endmodule
