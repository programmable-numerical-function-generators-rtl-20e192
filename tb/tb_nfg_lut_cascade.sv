// tb_nfg_lut_cascade: test of the LUT-cascade segment index encoder.
//
// Several random segmentations (random sorted boundaries, from a handful
// of segments up to the full 2^SEG_W) are loaded with contents built by
// nfg_tb_pkg, one of them with a boundary set that straddles the sign of
// x.  Every 16-bit x is then streamed through at full rate and the index is
// compared with a binary search over the boundaries.  The latency must be
// N_CAS cycles.
module tb_nfg_lut_cascade;
  import nfg_pkg::*;
  import nfg_tb_pkg::*;

  localparam int X_W     = DEF_X_W;
  localparam int N_CAS   = DEF_N_CAS;
  localparam int FIRST_W = DEF_FIRST_W;
  localparam int R       = DEF_SEG_W;
  localparam int REST_W  = (X_W - FIRST_W) / (N_CAS - 1);
  localparam int SEL_W   = $clog2(N_CAS);
  localparam longint WATCHDOG = 2_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [X_W-1:0] x = '0;
  logic out_valid;
  logic [R-1:0] seg_idx;
  logic cfg_we = 1'b0;
  logic [SEL_W-1:0] cfg_lut = '0;
  logic [R+REST_W-1:0] cfg_addr = '0;
  logic [R-1:0] cfg_data = '0;

  always #5 clk = ~clk;

  nfg_lut_cascade dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  nfg_program prog;
  int     exp_code[$];
  longint exp_cycle[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int code, e;
      longint issued;
      code = exp_code.pop_front();
      issued = exp_cycle.pop_front();
      e = prog.seg_of(longint'(code));
      checks += 2;
      if (int'(seg_idx) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d index %0d expected %0d", code, seg_idx, e);
      end
      if (cycle - issued != longint'(N_CAS)) begin
        failures++;
        if (failures < 10) $display("FAIL: latency %0d", cycle - issued);
      end
    end
  end

  task automatic run(int t, bit signed_range);
    int b[$];
    prog = new(X_W, X_W - 1, R, N_CAS, FIRST_W, 16, 15, 4, 20, 15, 4, 1'b1, 1'b1);
    // boundaries: t-1 distinct values above the segment start
    prog.seg_s.delete();
    prog.seg_s.push_back(longint'(signed_range ? -(1 << (X_W - 1)) : 0));
    while (b.size() < t - 1) begin
      int v;
      v = signed_range ? (int'($urandom_range((1 << X_W) - 2)) - (1 << (X_W - 1)) + 1)
                       : int'($urandom_range((1 << (X_W - 1)) - 1, 1));
      // kept as non-negative offsets so that the sort is numeric
      v = v + (1 << (X_W - 1));
      if (!(v inside {b})) b.push_back(v);
    end
    b.sort();
    foreach (b[i]) begin
      longint bv;
      bv = longint'(b[i]);
      prog.seg_s.push_back(bv - (longint'(1) << (X_W - 1)));
    end
    prog.build_cascade();
    for (int k = 0; k < N_CAS; k++)
      for (int a = 0; a < prog.lut_size[k]; a++) begin
        cfg_we <= 1'b1; cfg_lut <= SEL_W'(k); cfg_addr <= (R+REST_W)'(a);
        cfg_data <= R'(prog.lut[prog.lut_base[k] + a]);
        @(posedge clk);
      end
    cfg_we <= 1'b0;
    for (int c = (signed_range ? -(1 << (X_W - 1)) : 0); c < (1 << (X_W - 1)); c++) begin
      in_valid <= 1'b1; x <= X_W'(c);
      exp_code.push_back(c); exp_cycle.push_back(cycle + 1);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (N_CAS + 2) @(posedge clk);
    checks++;
    if (exp_code.size() != 0) begin failures++; exp_code.delete(); exp_cycle.delete(); end
    $display("%0d segments checked", t);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(2, 1'b0);
    run(127, 1'b0);
    run(702, 1'b0);
    run(1 << R, 1'b0);
    run(300, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == WATCHDOG);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
