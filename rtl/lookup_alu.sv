// lookup_alu: the processing unit of the lookup chip.
//
// Combines the pipelined lookup (dir24_lookup) and the route update engine
// (route_update) in front of the two route tables. Both need the TBL24 read
// port: the update engine reads one TBL24 entry before each route longer than
// 24 bits, and it has priority. In that cycle the lookup input is stalled
// (in_ready low); lookups already accepted carry on. The TBL24 and TBLlong write
// ports belong to the update engine, the TBLlong read port to the lookup.
// Lookups interleaved with an update see the tables as they are at that moment;
// a route is complete once done has pulsed. The priority rule and this
// consistency model are this design's choices.
//
// Interface: as dir24_lookup on the lookup side (3-cycle latency, one address per
// clock when not stalled) and as route_update on the command side. The memory
// ports expect a one-cycle registered read.
module lookup_alu
#(
  parameter int unsigned ADDR_W      = iplk_pkg::ADDR_W,
  parameter int unsigned IDX_W       = iplk_pkg::IDX_W,
  parameter int unsigned PTR_W       = iplk_pkg::PTR_W,
  parameter int unsigned NH_W        = iplk_pkg::NH_W,
  parameter int unsigned LEN_W       = iplk_pkg::LEN_W,
  parameter int unsigned LONG_BLOCKS = 2**PTR_W,
  localparam int unsigned TL_W       = PTR_W + ADDR_W - IDX_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookups
  input  logic              lk_valid,
  output logic              lk_ready,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              res_valid,
  output logic [ADDR_W-1:0] res_addr,
  output logic [NH_W-1:0]   res_nh,
  output logic              res_long,
  // route commands
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  iplk_pkg::cmd_op_t           cmd_op,
  input  logic [ADDR_W-1:0] cmd_prefix,
  input  logic [LEN_W-1:0]  cmd_len,
  input  logic [NH_W-1:0]   cmd_nh,
  output logic              upd_busy,
  output logic              upd_done,
  output logic              upd_err_full,
  output logic [PTR_W:0]    blocks_used,
  output logic              lk_stall,     // a lookup waited for the TBL24 port
  // TBL24
  output logic              t24_rd_en,
  output logic [IDX_W-1:0]  t24_rd_addr,
  input  logic [NH_W:0]     t24_rd_data,
  output logic              t24_wr_en,
  output logic [IDX_W-1:0]  t24_wr_addr,
  output logic [NH_W:0]     t24_wr_data,
  // TBLlong
  output logic              tl_rd_en,
  output logic [TL_W-1:0]   tl_rd_addr,
  input  logic [NH_W-1:0]   tl_rd_data,
  output logic              tl_wr_en,
  output logic [TL_W-1:0]   tl_wr_addr,
  output logic [NH_W-1:0]   tl_wr_data
);

  logic             lk_t24_en, up_t24_en;
  logic [IDX_W-1:0] lk_t24_addr, up_t24_addr;

  dir24_lookup #(
    .ADDR_W(ADDR_W), .IDX_W(IDX_W), .PTR_W(PTR_W), .NH_W(NH_W)
  ) u_lookup (
    .clk, .rst_n,
    .in_valid   (lk_valid),
    .in_ready   (lk_ready),
    .in_addr    (lk_addr),
    .t24_gnt    (!up_t24_en),
    .t24_rd_en  (lk_t24_en),
    .t24_rd_addr(lk_t24_addr),
    .t24_rd_data,
    .tl_rd_en,
    .tl_rd_addr,
    .tl_rd_data,
    .out_valid  (res_valid),
    .out_addr   (res_addr),
    .out_nh     (res_nh),
    .out_long   (res_long)
  );

  route_update #(
    .ADDR_W(ADDR_W), .IDX_W(IDX_W), .PTR_W(PTR_W), .NH_W(NH_W), .LEN_W(LEN_W),
    .LONG_BLOCKS(LONG_BLOCKS)
  ) u_update (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_prefix, .cmd_len, .cmd_nh,
    .t24_rd_en  (up_t24_en),
    .t24_rd_addr(up_t24_addr),
    .t24_rd_data,
    .t24_wr_en, .t24_wr_addr, .t24_wr_data,
    .tl_wr_en, .tl_wr_addr, .tl_wr_data,
    .busy       (upd_busy),
    .done       (upd_done),
    .err_full   (upd_err_full),
    .blocks_used
  );

  assign t24_rd_en   = up_t24_en || lk_t24_en;
  assign t24_rd_addr = up_t24_en ? up_t24_addr : lk_t24_addr;
  assign lk_stall    = lk_valid && up_t24_en;

  // The two users of the TBL24 read port never read in the same cycle.
  a_t24_port_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(lk_t24_en && up_t24_en));

endmodule
