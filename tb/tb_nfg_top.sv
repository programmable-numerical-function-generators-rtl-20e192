// tb_nfg_top: end-to-end test of the generator at its default sizes.
//
// For each function of the evaluation set (16-bit precision input with 15
// fraction bits, acceptable approximation error 2^-17, then again at the
// coarse target 2^-9, where the error may reach the target) the testbench
// segments the domain, builds the cascade and coefficient tables with
// nfg_tb_pkg, writes them through the configuration port, then streams
// every representable x of the domain through the pipeline, with random
// idle cycles in between.  Every result is checked twice: bit-exactly
// against the package's datapath model, and against f(x) itself, where it
// must be within one output LSB (2^-15), plus the target for 2^-9.  The latency of every result is
// checked against nfg_pkg::nfg_latency.  The number of segments per
// function is printed.  Mechanisms counted (each must occur): results that
// used the scaling shift, results with a negative slope, back-to-back
// results at full throughput, idle cycles, and reprogramming from one
// function to another.
module tb_nfg_top;
  import nfg_pkg::*;
  import nfg_tb_pkg::*;

  localparam bit USE_SHIFT = 1'b1;
  localparam bit USE_SIGN  = 1'b1;
  localparam int X_FRAC    = DEF_X_FRAC;
  localparam int C1_FRAC   = DEF_C1_FRAC;
  localparam real XS       = 2.0 ** X_FRAC;           // input scale
  localparam int Y_W       = DEF_Y_W;
  localparam int Y_FRAC    = DEF_Y_FRAC;
  localparam real AAE      = 2.0 ** -17;              // acceptable approximation error
  localparam real AAE_COARSE = 2.0 ** -9;             // coarse target of the same set
  localparam real YS       = 2.0 ** Y_FRAC;           // output scale
  localparam int LAT       = nfg_latency(DEF_N_CAS, USE_SHIFT, USE_SIGN);
  localparam int SEL_W    = $clog2(DEF_N_CAS + 1);
  localparam int REST_W   = (DEF_X_W - DEF_FIRST_W) / (DEF_N_CAS - 1);
  localparam int A_W      = Y_W + DEF_GUARD;
  localparam int WORD_W   = DEF_X_W + 1 + DEF_L_W + DEF_C1_W + A_W;
  localparam int CFG_A_W  = DEF_SEG_W + REST_W;
  localparam int CFG_D_W  = WORD_W;
  localparam longint WATCHDOG = 3_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DEF_X_W-1:0] x = '0;
  logic out_valid;
  logic signed [Y_W-1:0] y;
  logic cfg_we = 1'b0;
  logic [SEL_W-1:0] cfg_sel = '0;
  logic [CFG_A_W-1:0] cfg_addr = '0;
  logic [CFG_D_W-1:0] cfg_data = '0;

  always #5 clk = ~clk;

  nfg_top dut (
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
  int     exp_code[$];
  longint exp_cycle[$];
  real    worst_ulp;
  real    tol_lsb = 1.0;     // allowed |y - f(x)| in output LSBs
  bit     last_valid = 1'b0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int code, i;
      longint ym, issued;
      real err;
      if (exp_code.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result y=%0d", y);
      end else begin
        code   = exp_code.pop_front();
        issued = exp_cycle.pop_front();
        ym     = prog.model_y(longint'(code));
        i      = prog.seg_of(longint'(code));
        checks += 3;
        if (longint'(y) != ym) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %s x=%0d y=%0d model=%0d", f_name(prog.fn), code, y, ym);
        end
        err = (real'(y) / YS - prog.fv[code - prog.lo]) * YS;
        if (err < 0) err = -err;
        if (err > worst_ulp) worst_ulp = err;
        if (err > tol_lsb) begin
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

  task automatic cfg_write(int sel, int addr, logic [63:0] data);
    cfg_we   <= 1'b1;
    cfg_sel  <= SEL_W'(sel);
    cfg_addr <= CFG_A_W'(addr);
    cfg_data <= CFG_D_W'(data);
    @(posedge clk);
  endtask

  task automatic load_tables();
    int base, size, nseg;
    for (int k = 0; k < DEF_N_CAS; k++) begin
      base = prog.lut_base[k];
      size = prog.lut_size[k];
      for (int a = 0; a < size; a++) cfg_write(k, a, 64'(prog.lut[base + a]));
    end
    nseg = prog.seg_s.size();
    for (int i = 0; i < nseg; i++) cfg_write(DEF_N_CAS, i, prog.coef_word(i));
    cfg_we <= 1'b0;
  endtask

  task automatic run_function(func_e fn, real lo_r, real hi_r, bit lo_open, real aae);
    int lo, hi;
    lo = int'(lo_r * XS) + (lo_open ? 1 : 0);
    hi = int'(hi_r * XS);
    if (hi > 2**(DEF_X_W-1) - 1) hi = 2**(DEF_X_W-1) - 1;
    prog = new(DEF_X_W, X_FRAC, DEF_SEG_W, DEF_N_CAS, DEF_FIRST_W,
               DEF_C1_W, C1_FRAC, DEF_L_W, Y_W, Y_FRAC, DEF_GUARD,
               USE_SHIFT, USE_SIGN);
    prog.segment(fn, longint'(lo), longint'(hi), aae);
    tol_lsb = (aae <= AAE) ? 1.0 : 1.0 + aae * YS;
    prog.quantize();
    prog.build_cascade();
    if (!prog.fits) begin
      failures++;
      $display("FAIL: %s does not fit the table formats", f_name(fn));
    end
    load_tables();
    n_reprogram++;
    worst_ulp = 0.0;
    for (int c = lo; c <= hi; c++) begin
      in_valid <= 1'b1;
      x <= DEF_X_W'(c);
      exp_code.push_back(c);
      exp_cycle.push_back(cycle + 1);
      @(posedge clk);
      if ($urandom_range(15) == 0) begin
        in_valid <= 1'b0;
        n_idle++;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_code.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_code.size());
      exp_code.delete(); exp_cycle.delete();
    end
    $display("%-12s domain [%0d, %0d]/2^%0d, target 2^%0d: %0d segments, worst error %0.3f LSB",
             f_name(fn), lo, hi, X_FRAC, $rtoi($ln(aae) / $ln(2.0) - 0.5), prog.seg_s.size(),
             worst_ulp);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_function(F_SIN,      0.0,     0.5,  1'b0, AAE);
    run_function(F_COS,      0.0,     0.5,  1'b0, AAE);
    run_function(F_TAN,      0.0,     0.25, 1'b0, AAE);
    run_function(F_RECIP,    0.125,   1.0,  1'b0, AAE);
    run_function(F_RSQRT,    1.0/32,  1.0,  1'b0, AAE);
    run_function(F_SQRT,     0.0,     1.0,  1'b0, AAE);
    run_function(F_SQRT_NLN, 0.0,     1.0,  1'b1, AAE);
    run_function(F_EXP2,     0.0,     1.0,  1'b0, AAE);
    run_function(F_SIGMOID,  0.0,     1.0,  1'b0, AAE);
    run_function(F_GAUSS,    0.0,     0.5,  1'b0, AAE);
    // the same functions at the coarse target 2^-9: error up to the target
    // plus one LSB
    run_function(F_SIN,      0.0,     0.5,  1'b0, AAE_COARSE);
    run_function(F_COS,      0.0,     0.5,  1'b0, AAE_COARSE);
    run_function(F_TAN,      0.0,     0.25, 1'b0, AAE_COARSE);
    run_function(F_RECIP,    0.125,   1.0,  1'b0, AAE_COARSE);
    run_function(F_RSQRT,    1.0/32,  1.0,  1'b0, AAE_COARSE);
    run_function(F_SQRT,     0.0,     1.0,  1'b0, AAE_COARSE);
    run_function(F_SQRT_NLN, 0.0,     1.0,  1'b1, AAE_COARSE);
    run_function(F_EXP2,     0.0,     1.0,  1'b0, AAE_COARSE);
    run_function(F_SIGMOID,  0.0,     1.0,  1'b0, AAE_COARSE);
    run_function(F_GAUSS,    0.0,     0.5,  1'b0, AAE_COARSE);
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
