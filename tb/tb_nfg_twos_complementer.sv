// tb_nfg_twos_complementer: test of the sign stage.
//
// Random magnitudes (with 0 and the largest magnitude) and signs; the
// output must be +mag or -mag as a W+1 bit two's complement number one
// cycle later.
module tb_nfg_twos_complementer;
  localparam int W = nfg_pkg::DEF_Y_W + nfg_pkg::DEF_GUARD;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W-1:0] mag = '0;
  logic neg = 1'b0;
  logic out_valid;
  logic signed [W:0] val;
  always #5 clk = ~clk;

  nfg_twos_complementer dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      longint m;
      bit s, v;
      m = longint'($urandom_range(2**W - 1));
      if (n == 1) m = 2**W - 1;
      if (n == 2) m = 0;
      s = 1'($urandom_range(1));
      v = ($urandom_range(4) != 0);
      mag <= W'(m); neg <= s; in_valid <= v;
      @(posedge clk);
      #1;
      checks += 2;
      if (out_valid !== v) failures++;
      if (longint'(val) != (s ? -m : m)) begin
        failures++;
        if (failures < 10) $display("FAIL: mag=%0d neg=%0d val=%0d", m, s, val);
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
