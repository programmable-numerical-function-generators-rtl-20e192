// tb_nfg_multiplier: test of the unsigned slope x offset multiplier.
//
// Random operands plus all-ones and zero corners; the product must be the
// full-width unsigned product one cycle later.
module tb_nfg_multiplier;
  localparam int C1_W = nfg_pkg::DEF_C1_W, D_W = nfg_pkg::DEF_X_W;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [C1_W-1:0] c1_mag = '0;
  logic [D_W-1:0] d = '0;
  logic out_valid;
  logic [C1_W+D_W-1:0] prod;
  always #5 clk = ~clk;

  nfg_multiplier dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      longint a, b;
      bit v;
      a = longint'($urandom_range(2**C1_W - 1));
      b = longint'($urandom_range(2**D_W - 1));
      if (n == 1) begin a = 2**C1_W - 1; b = 2**D_W - 1; end
      if (n == 2) begin a = 0; end
      v = ($urandom_range(4) != 0);
      c1_mag <= C1_W'(a); d <= D_W'(b); in_valid <= v;
      @(posedge clk);
      #1;
      checks += 2;
      if (out_valid !== v) failures++;
      if (longint'(prod) != a * b) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d * %0d = %0d", a, b, prod);
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
