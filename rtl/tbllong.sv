// tbllong: the second-level route table of the DIR-24-8-BASIC lookup.
//
// Holds the next hops of prefixes longer than 24 bits. It is organised as
// 2^15 blocks of 256 entries; entry {block, a[7:0]} is the next hop for every
// address a whose TBL24 entry points to that block. With a 15-bit block number
// the table has 2^23 entries (the depth follows from the scheme). The 15-bit
// entry width (the next-hop width of TBL24) is this design's choice.
//
// Interface: one read and one write port on clk; read data is registered and
// appears one cycle after rd_en. A same-cycle read and write of one address
// returns the old contents. No reset: blocks are always filled completely by
// the update engine before a TBL24 entry can point to them.
module tbllong #(
  parameter int unsigned ADDR_W = iplk_pkg::PTR_W + 8,
  parameter int unsigned DATA_W = iplk_pkg::NH_W
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
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
