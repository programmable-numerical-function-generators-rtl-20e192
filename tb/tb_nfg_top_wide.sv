// tb_nfg_top_wide: the generator with a 33-bit-precision input.
//
// The configuration is that of sqrt(-ln x) on (0, 1] with 1 integer and 32
// fraction input bits and 3 integer and 5 fraction output bits.  x is two's
// complement here, so it takes a sign bit more: X_W = 34, X_FRAC = 32.  The
// output is Y_W = 9 with Y_FRAC = 5.  The cascade has N_CAS = 14 LUTs (8 x
// bits, then 2 per LUT) and SEG_W = 6 for the 41 segments found, so with the
// scaling shift and the two's complementer the pipeline is 14 + 6 = 20
// stages.  The slope grows without bound at both ends of the domain, which
// needs shifts up to 28: L_W = 5, with a 10-bit scaled slope (C1_W = 10,
// C1_FRAC = 9).  The acceptable approximation error is 2^-7, a quarter of
// the output LSB.
//
// 2^32 inputs cannot all be run.  The segments are found by sampling long
// segments (see nfg_tb_pkg), and the hardware is run on every segment start
// and its neighbours, the ends of the domain, and random x, with random idle
// cycles.  Each result is checked bit-exactly against the model, within one
// output LSB of f(x), and for its latency.
module tb_nfg_top_wide;
  import nfg_pkg::*;
  import nfg_tb_pkg::*;

  localparam bit USE_SHIFT = 1'b1;
  localparam bit USE_SIGN  = 1'b1;
  localparam int X_W       = 34;
  localparam int X_FRAC    = 32;
  localparam int SEG_W     = 6;
  localparam int N_CAS     = 14;
  localparam int FIRST_W   = 8;
  localparam int C1_W      = 10;
  localparam int C1_FRAC   = 9;
  localparam int L_W       = 5;
  localparam int Y_W       = 9;
  localparam int Y_FRAC    = 5;
  localparam int GUARD     = DEF_GUARD;
  localparam real XS       = 2.0 ** X_FRAC;           // input scale
  localparam real AAE      = 2.0 ** -7;               // acceptable approximation error
  localparam real YS       = 2.0 ** Y_FRAC;           // output scale
  localparam int LAT       = nfg_latency(N_CAS, USE_SHIFT, USE_SIGN);
  localparam int SEL_W     = $clog2(N_CAS + 1);
  localparam int REST_W    = (X_W - FIRST_W) / (N_CAS - 1);
  localparam int A_W       = Y_W + GUARD;
  localparam int WORD_W    = X_W + 1 + L_W + C1_W + A_W;
  localparam int CFG_A_W   = SEG_W + REST_W;
  localparam int CFG_D_W   = WORD_W;
  localparam int N_RANDOM  = 100_000;
  localparam longint WATCHDOG = 1_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [X_W-1:0] x = '0;
  logic out_valid;
  logic signed [Y_W-1:0] y;
  logic cfg_we = 1'b0;
  logic [SEL_W-1:0] cfg_sel = '0;
  logic [CFG_A_W-1:0] cfg_addr = '0;
  logic [CFG_D_W-1:0] cfg_data = '0;

  always #5 clk = ~clk;

  nfg_top #(
    .X_W(X_W), .X_FRAC(X_FRAC), .SEG_W(SEG_W), .N_CAS(N_CAS), .FIRST_W(FIRST_W),
    .C1_W(C1_W), .C1_FRAC(C1_FRAC), .L_W(L_W), .Y_W(Y_W), .Y_FRAC(Y_FRAC),
    .GUARD(GUARD)
  ) dut (
    .clk, .rst_n, .in_valid, .x, .out_valid, .y,
    .cfg_we, .cfg_sel, .cfg_addr, .cfg_data
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_shift = 0, n_negslope = 0, n_b2b = 0, n_idle = 0;
  int max_shl = 0;

  nfg_program prog;
  int n_accfail = 0;

  // expected results in issue order
  longint exp_code[$];
  longint exp_cycle[$];
  real    worst_ulp = 0.0;
  bit     last_valid = 1'b0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int i;
      longint code, ym, issued;
      real err;
      if (exp_code.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result y=%0d", y);
      end else begin
        code   = exp_code.pop_front();
        issued = exp_cycle.pop_front();
        ym     = prog.model_y(code);
        i      = prog.seg_of(code);
        checks += 3;
        if (longint'(y) != ym) begin
          failures++;
          if (failures < 10)
            $display("FAIL: x=%0d y=%0d model=%0d", code, y, ym);
        end
        err = (real'(y) / YS - f_eval(prog.fn, prog.xr(code))) * YS;
        if (err < 0) err = -err;
        if (err > worst_ulp) worst_ulp = err;
        if (err > 1.0) begin
          failures++;
          if (n_accfail++ < 10)
            $display("FAIL: x=%0d error %f LSB", code, err);
        end
        if (cycle - issued != longint'(LAT)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: latency %0d, expected %0d", cycle - issued, LAT);
        end
        if (prog.q_shl[i] > 0) n_shift++;
        if (prog.q_shl[i] > max_shl) max_shl = prog.q_shl[i];
        if (prog.q_neg[i]) n_negslope++;
        if (last_valid) n_b2b++;
      end
    end
    last_valid <= out_valid;
  end

  task automatic cfg_write(int sel, int addr, logic [63:0] data);
    cfg_we   <= 1'b1;
    cfg_sel  <= SEL_W'(sel);
    cfg_addr <= CFG_A_W'(addr);
    cfg_data <= CFG_D_W'(data);
    @(posedge clk);
  endtask

  task automatic load_tables();
    int base, size, nseg;
    for (int k = 0; k < N_CAS; k++) begin
      base = prog.lut_base[k];
      size = prog.lut_size[k];
      for (int a = 0; a < size; a++) cfg_write(k, a, 64'(prog.lut[base + a]));
    end
    nseg = prog.seg_s.size();
    for (int i = 0; i < nseg; i++) cfg_write(N_CAS, i, prog.coef_word(i));
    cfg_we <= 1'b0;
  endtask

  task automatic issue(longint c);
    in_valid <= 1'b1;
    x <= X_W'(c);
    exp_code.push_back(c);
    exp_cycle.push_back(cycle + 1);
    @(posedge clk);
    if ($urandom_range(15) == 0) begin
      in_valid <= 1'b0;
      n_idle++;
      @(posedge clk);
    end
  endtask

  initial begin
    longint lo, hi, c;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    lo = 1;                                  // x = 2^-32
    hi = longint'(1) << X_FRAC;              // x = 1
    prog = new(X_W, X_FRAC, SEG_W, N_CAS, FIRST_W, C1_W, C1_FRAC, L_W,
               Y_W, Y_FRAC, GUARD, USE_SHIFT, USE_SIGN);
    prog.segment(F_SQRT_NLN, lo, hi, AAE);
    prog.quantize();
    prog.build_cascade();
    checks++;
    if (!prog.fits) begin
      failures++;
      $display("FAIL: the segments do not fit the table formats");
    end
    load_tables();
    // segment starts and their neighbours, then the ends, then random x
    foreach (prog.seg_s[i])
      for (longint d = -1; d <= 1; d++) begin
        c = prog.seg_s[i] + d;
        if (c >= lo && c <= hi) issue(c);
      end
    issue(lo);
    issue(hi);
    for (int n = 0; n < N_RANDOM; n++)
      issue(lo + longint'({$urandom, $urandom} % 64'(hi - lo + 1)));
    in_valid <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_code.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_code.size());
    end
    $display("%s domain [%0d, %0d]/2^%0d: %0d segments, worst error %0.3f LSB",
             f_name(prog.fn), lo, hi, X_FRAC, prog.seg_s.size(), worst_ulp);
    $display("pipeline stages: %0d; largest shift: %0d", LAT, max_shl);
    $display("mechanisms: shifted=%0d negative_slope=%0d back_to_back=%0d idle=%0d",
             n_shift, n_negslope, n_b2b, n_idle);
    checks += 5;
    if (LAT != 20)        begin failures++; $display("FAIL: %0d pipeline stages", LAT); end
    if (n_shift == 0)     begin failures++; $display("FAIL: scaling shift never used"); end
    if (n_negslope == 0)  begin failures++; $display("FAIL: negative slope never used"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL: no back-to-back results"); end
    if (n_idle == 0)      begin failures++; $display("FAIL: no idle cycles"); end
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
