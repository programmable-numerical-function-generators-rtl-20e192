// tb_nfg_top_fine: the generator built for an approximation error of 2^-25.
//
// The twelve functions of the segmentation study are run at the fine
// target 2^-25.  This takes thousands of segments and a finer input and
// output than the default build: x has 2 integer and 24 fraction bits
// (X_W = 26, X_FRAC = 24), y has 26 fraction bits (Y_W = 31, Y_FRAC = 26),
// the coefficients table has 2^14 entries (SEG_W = 14), and the cascade has
// 11 LUTs, 6 x bits then 2 per LUT.  The slope is stored in 24 bits
// (C1_W = 24, C1_FRAC = 23) with shifts up to 31 (L_W = 5) for the steep
// ends of sqrt(-ln x).  Only these sizes differ from the default build.
//
// 2^24 inputs per unit of the domain cannot all be run.  The segments are
// found by sampling long segments (see nfg_tb_pkg), and the hardware is run
// on every segment start and its neighbours, both ends of the domain, and
// random x, with random idle cycles.  Each result is checked bit-exactly
// against the model, within the target plus one output LSB of f(x), and for
// its latency.  The number of segments per function is printed.
module tb_nfg_top_fine;
  import nfg_pkg::*;
  import nfg_tb_pkg::*;

  localparam bit USE_SHIFT = 1'b1;
  localparam bit USE_SIGN  = 1'b1;
  localparam int X_W       = 26;
  localparam int X_FRAC    = 24;
  localparam int SEG_W     = 14;
  localparam int N_CAS     = 11;
  localparam int FIRST_W   = 6;
  localparam int C1_W      = 24;
  localparam int C1_FRAC   = 23;
  localparam int L_W       = 5;
  localparam int Y_W       = 31;
  localparam int Y_FRAC    = 26;
  localparam int GUARD     = DEF_GUARD;
  localparam real XS       = 2.0 ** X_FRAC;           // input scale
  localparam real AAE      = 2.0 ** -25;              // acceptable approximation error
  localparam real YS       = 2.0 ** Y_FRAC;           // output scale
  localparam real TOL_LSB  = AAE * YS + 1.0;          // allowed |y - f(x)| in LSBs
  localparam int LAT       = nfg_latency(N_CAS, USE_SHIFT, USE_SIGN);
  localparam int SEL_W     = $clog2(N_CAS + 1);
  localparam int REST_W    = (X_W - FIRST_W) / (N_CAS - 1);
  localparam int A_W       = Y_W + GUARD;
  localparam int WORD_W    = X_W + 1 + L_W + C1_W + A_W;
  localparam int CFG_A_W   = SEG_W + REST_W;
  localparam int CFG_D_W   = WORD_W;
  localparam int N_RANDOM  = 5_000;
  localparam longint WATCHDOG = 12_000_000;

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
  int n_shift = 0, n_negslope = 0, n_b2b = 0, n_idle = 0, n_reprogram = 0;

  nfg_program prog;
  int n_accfail = 0;

  // expected results in issue order
  longint exp_code[$];
  longint exp_cycle[$];
  real    worst_ulp;
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
            $display("FAIL: %s x=%0d y=%0d model=%0d", f_name(prog.fn), code, y, ym);
        end
        err = (real'(y) / YS - f_eval(prog.fn, prog.xr(code))) * YS;
        if (err < 0) err = -err;
        if (err > worst_ulp) worst_ulp = err;
        if (err > TOL_LSB) begin
          failures++;
          if (n_accfail++ < 10)
            $display("FAIL: %s x=%0d error %f LSB", f_name(prog.fn), code, err);
        end
        if (cycle - issued != longint'(LAT)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: latency %0d, expected %0d", cycle - issued, LAT);
        end
        if (prog.q_shl[i] > 0) n_shift++;
        if (prog.q_neg[i]) n_negslope++;
        if (last_valid) n_b2b++;
      end
    end
    last_valid <= out_valid;
  end

  task automatic cfg_write(int sel, int addr, logic [127:0] data);
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
      for (int a = 0; a < size; a++) cfg_write(k, a, 128'(prog.lut[base + a]));
    end
    nseg = prog.seg_s.size();
    for (int i = 0; i < nseg; i++) cfg_write(N_CAS, i, prog.coef_word_wide(i));
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

  task automatic run_function(func_e fn, real lo_r, real hi_r, bit lo_open);
    longint lo, hi, c;
    lo = longint'(lo_r * XS) + (lo_open ? 1 : 0);
    hi = longint'(hi_r * XS);
    if (hi > (longint'(1) << (X_W - 1)) - 1) hi = (longint'(1) << (X_W - 1)) - 1;
    prog = new(X_W, X_FRAC, SEG_W, N_CAS, FIRST_W, C1_W, C1_FRAC, L_W,
               Y_W, Y_FRAC, GUARD, USE_SHIFT, USE_SIGN);
    prog.segment(fn, lo, hi, AAE);
    prog.quantize();
    prog.build_cascade();
    checks++;
    if (!prog.fits) begin
      failures++;
      $display("FAIL: %s does not fit the table formats", f_name(fn));
    end
    load_tables();
    n_reprogram++;
    worst_ulp = 0.0;
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
      exp_code.delete(); exp_cycle.delete();
    end
    $display("%-12s domain [%0d, %0d]/2^%0d: %0d segments, worst error %0.3f LSB",
             f_name(fn), lo, hi, X_FRAC, prog.seg_s.size(), worst_ulp);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_function(F_EXP2,     0.0,     1.0,  1'b0);
    run_function(F_RECIP,    0.125,   1.0,  1'b0);
    run_function(F_RSQRT,    1.0/32,  1.0,  1'b0);
    run_function(F_SQRT,     0.0,     1.0,  1'b0);
    run_function(F_SQRT_NLN, 0.0,     1.0,  1'b1);
    run_function(F_LOG2,     1.0,     2.0,  1'b0);
    run_function(F_LN,       1.0,     2.0,  1'b1);
    run_function(F_SIN,      0.0,     0.5,  1'b0);
    run_function(F_COS,      0.0,     0.5,  1'b0);
    run_function(F_TAN,      0.0,     0.25, 1'b0);
    run_function(F_SIGMOID,  0.0,     1.0,  1'b0);
    run_function(F_GAUSS,    0.0,     0.5,  1'b0);
    $display("mechanisms: shifted=%0d negative_slope=%0d back_to_back=%0d idle=%0d reprogram=%0d",
             n_shift, n_negslope, n_b2b, n_idle, n_reprogram);
    checks += 5;
    if (n_shift == 0)     begin failures++; $display("FAIL: scaling shift never used"); end
    if (n_negslope == 0)  begin failures++; $display("FAIL: negative slope never used"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL: no back-to-back results"); end
    if (n_idle == 0)      begin failures++; $display("FAIL: no idle cycles"); end
    if (n_reprogram < 2)  begin failures++; $display("FAIL: never reprogrammed"); end
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
