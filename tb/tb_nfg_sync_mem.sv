// tb_nfg_sync_mem: test of the synchronous memory block.
//
// Fills a 256 x 12 memory with random words, then reads random addresses
// (with random read-enable gaps and concurrent writes) and checks each word
// one cycle after its address, against a shadow array.  A disabled read
// must hold the previous word; a write and a read of the same address in
// one cycle must return the old word.
module tb_nfg_sync_mem;
  localparam int AW = 8, DW = 12;
  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [DW-1:0] rd_data, wr_data = '0;
  always #5 clk = ~clk;

  nfg_sync_mem #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  logic [DW-1:0] shadow [2**AW];
  logic [DW-1:0] expect_q;

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      wr_en <= 1'b1; wr_addr <= AW'(a); wr_data <= DW'($urandom);
      @(posedge clk);
      shadow[a] = wr_data;
    end
    wr_en <= 1'b0;
    rd_en <= 1'b1; rd_addr <= '0;
    @(posedge clk);
    expect_q = shadow[0];
    for (int n = 0; n < 4000; n++) begin
      logic en;
      logic [AW-1:0] ra, wa;
      logic [DW-1:0] wd;
      logic we;
      en = ($urandom_range(3) != 0);
      ra = AW'($urandom); wa = AW'($urandom); wd = DW'($urandom);
      we = ($urandom_range(1) == 0);
      if (n % 50 == 0) wa = ra;         // same-address write and read
      rd_en <= en; rd_addr <= ra; wr_en <= we; wr_addr <= wa; wr_data <= wd;
      @(posedge clk);
      #1;
      checks++;
      if (en) expect_q = shadow[ra];
      if (rd_data !== expect_q) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %0d read %h expected %h", ra, rd_data, expect_q);
      end
      if (we) shadow[wa] = wd;
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
