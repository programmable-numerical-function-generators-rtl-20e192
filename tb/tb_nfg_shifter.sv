// tb_nfg_shifter: test of the scaling shift and the product alignment.
//
// For random products and every shift amount, the output must be
// floor(prod * 2^l / 2^(IN_FRAC-OUT_FRAC)) kept to OUT_W bits, one cycle
// later.  The reference is computed in real arithmetic on the value the
// product represents, independently of the bit manipulation.
module tb_nfg_shifter;
  import nfg_pkg::*;
  localparam int IN_W = DEF_C1_W + DEF_X_W, IN_FRAC = DEF_C1_FRAC + DEF_X_FRAC;
  localparam int L_W = DEF_L_W, OUT_W = DEF_Y_W + DEF_GUARD, OUT_FRAC = DEF_Y_FRAC + DEF_GUARD;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [IN_W-1:0] prod = '0;
  logic [L_W-1:0] shl = '0;
  logic out_valid;
  logic [OUT_W-1:0] mag;
  always #5 clk = ~clk;

  nfg_shifter dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      longint p, e;
      int l;
      real val;
      bit v;
      l = $urandom_range(2**L_W - 1);
      // keep the shifted value inside the output range
      p = longint'({$urandom, $urandom}) & ((longint'(1) << (IN_W - l)) - 1);
      p = p & ((longint'(1) << (OUT_W - OUT_FRAC + IN_FRAC - l)) - 1);
      val = real'(p) * $pow(2.0, real'(l - IN_FRAC));
      e = longint'($floor(val * $pow(2.0, real'(OUT_FRAC))));
      v = ($urandom_range(4) != 0);
      prod <= IN_W'(p); shl <= L_W'(l); in_valid <= v;
      @(posedge clk);
      #1;
      checks += 2;
      if (out_valid !== v) failures++;
      if (longint'(mag) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: prod=%0d l=%0d mag=%0d expected %0d", p, l, mag, e);
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
