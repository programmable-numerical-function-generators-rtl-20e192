// tb_nfg_output_adder: test of the last adder and its rounding.
//
// Random signed products and constants whose sum lies inside the output
// range; y must be the sum rounded to the nearest output LSB (halves
// upward), computed here in real arithmetic, one cycle later.
module tb_nfg_output_adder;
  import nfg_pkg::*;
  localparam int A_W = DEF_Y_W + DEF_GUARD, P_W = A_W + 1, G = DEF_GUARD, Y_W = DEF_Y_W;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [P_W-1:0] prod = '0;
  logic signed [A_W-1:0] c0 = '0;
  logic out_valid;
  logic signed [Y_W-1:0] y;
  always #5 clk = ~clk;

  nfg_output_adder dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      longint p, c, e;
      bit v;
      // operands within half of the range so that the sum fits
      p = longint'($urandom_range(2**(A_W-1) - 1)) - 2**(A_W-2);
      c = longint'($urandom_range(2**(A_W-1) - 1)) - 2**(A_W-2);
      e = longint'($floor(real'(p + c) / real'(2**G) + 0.5));
      v = ($urandom_range(4) != 0);
      prod <= P_W'(p); c0 <= A_W'(c); in_valid <= v;
      @(posedge clk);
      #1;
      checks += 2;
      if (out_valid !== v) failures++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d + %0d -> %0d expected %0d", p, c, y, e);
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
