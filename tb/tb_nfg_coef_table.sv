// tb_nfg_coef_table: test of the coefficients table.
//
// Writes a random word for every segment through the configuration port,
// then looks up random segment indices with random valid gaps and checks
// that each field (-s_i, sign, shift, scaled slope, c0) comes back,
// unpacked from the word as documented, one cycle after the index, with
// out_valid.
module tb_nfg_coef_table;
  import nfg_pkg::*;
  localparam int SEG_W = DEF_SEG_W, X_W = DEF_X_W, C1_W = DEF_C1_W, L_W = DEF_L_W;
  localparam int A_W = DEF_Y_W + DEF_GUARD;
  localparam int WORD_W = X_W + 1 + L_W + C1_W + A_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [SEG_W-1:0] seg_idx = '0;
  logic out_valid;
  logic signed [X_W-1:0] neg_s;
  logic c1_neg;
  logic [L_W-1:0] c1_shl;
  logic [C1_W-1:0] c1_mag;
  logic signed [A_W-1:0] c0;
  logic cfg_we = 1'b0;
  logic [SEG_W-1:0] cfg_addr = '0;
  logic [WORD_W-1:0] cfg_data = '0;
  always #5 clk = ~clk;

  nfg_coef_table dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  logic [WORD_W-1:0] shadow [2**SEG_W];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < 2**SEG_W; a++) begin
      logic [WORD_W-1:0] w;
      w = WORD_W'({$urandom, $urandom});
      shadow[a] = w;
      cfg_we <= 1'b1; cfg_addr <= SEG_W'(a); cfg_data <= w;
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    for (int n = 0; n < 5000; n++) begin
      logic v;
      logic [SEG_W-1:0] i;
      logic [WORD_W-1:0] w;
      v = ($urandom_range(3) != 0);
      i = SEG_W'($urandom);
      in_valid <= v; seg_idx <= i;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("FAIL: out_valid"); end
      if (v) begin
        w = shadow[i];
        checks += 5;
        if (neg_s  !== w[WORD_W-1 -: X_W])             failures++;
        if (c1_neg !== w[WORD_W-1-X_W])                failures++;
        if (c1_shl !== w[A_W+C1_W +: L_W])             failures++;
        if (c1_mag !== w[A_W +: C1_W])                 failures++;
        if (c0     !== w[A_W-1:0])                     failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
