// onchip_mem: the on-chip row memory of the lookup chip.
//
// 2^13 rows of 144 bits (about 1 Mbit), addressed by a 13-bit row index, as in
// the chip's reference model. In this design it stores the routing table in
// 9C-compressed form, one route per row (see iplk_pkg::route_row_t); that use of
// the rows is this design's choice.
//
// Interface: one read and one write port on clk; read data is registered and
// appears one cycle after rd_en. No reset of the contents.
module onchip_mem #(
  parameter int unsigned ADDR_W = iplk_pkg::ROW_ADDR_W,
  parameter int unsigned DATA_W = iplk_pkg::ROW_W
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
