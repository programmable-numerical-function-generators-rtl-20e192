// tb_nfg_offset_adder: test of d = x + (-s_i).
//
// Random pairs with s_i <= x (the case the generator produces), including
// negative x and s_i and the extremes of the range, are applied one per
// cycle; d must equal x - s_i as an unsigned number one cycle later, with
// out_valid following in_valid.
module tb_nfg_offset_adder;
  localparam int X_W = nfg_pkg::DEF_X_W;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [X_W-1:0] x = '0, neg_s = '0;
  logic out_valid;
  logic [X_W-1:0] d;
  always #5 clk = ~clk;

  nfg_offset_adder dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int s, xv;
      bit v;
      s  = int'($urandom_range(2**X_W - 1)) - 2**(X_W-1);
      xv = s + int'($urandom_range(2**(X_W-1) - 1 - s));
      if (n == 0) begin s = -(2**(X_W-1)); xv = 2**(X_W-1) - 1; end
      v = ($urandom_range(4) != 0);
      x <= X_W'(xv); neg_s <= X_W'(-s); in_valid <= v;
      @(posedge clk);
      #1;
      checks += 2;
      if (out_valid !== v) failures++;
      if (int'(d) != xv - s) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%0d s=%0d d=%0d", xv, s, d);
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
