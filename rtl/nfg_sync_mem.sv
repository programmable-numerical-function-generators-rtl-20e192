// nfg_sync_mem: synchronous memory block with one read and one write port.
//
// The table memories of the generator (the LUTs of the segment index
// encoder and the coefficients table) are mapped to synchronous memory
// blocks.  This is that block: the read address is sampled on the rising
// clock edge and the word appears on rd_data one cycle later (latency 1).
// The contents are loaded through the write port (wr_en, wr_addr,
// wr_data), which is what makes the generator programmable: any function
// is realised by writing new table contents.  A write and a read of the
// same address in one cycle return the old word.  The array is not reset;
// it must be written before it is read.
module nfg_sync_mem #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
