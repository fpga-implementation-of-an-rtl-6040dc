// tbl24: the first-level route table of the DIR-24-8-BASIC lookup.
//
// 2^IDX_W entries of DATA_W bits (2^24 x 16 bits = 32 MiB by default), indexed by
// the top 24 bits of the destination address. Entry bit 15 is the flag: 0 means
// bits 14:0 are the next hop, 1 means they number a 256-entry block of TBLlong.
// The table size and entry format are those of the DIR-24-8 scheme; the scheme
// keeps the table in an external DRAM, modelled here as a synchronous memory.
//
// Interface: one read port and one write port, both on clk. A read issued with
// rd_en in cycle t returns rd_data in cycle t+1 (registered read); rd_data holds
// its value while rd_en is low. A write to the address being read in the same
// cycle returns the old contents. The array has no reset: the update engine
// clears it with an explicit pass.
module tbl24 #(
  parameter int unsigned IDX_W  = iplk_pkg::IDX_W,
  parameter int unsigned DATA_W = 1 + iplk_pkg::NH_W
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [IDX_W-1:0]  rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [IDX_W-1:0]  wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [2**IDX_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
