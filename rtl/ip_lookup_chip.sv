// ip_lookup_chip: single-chip IPv4 route lookup with a compressed route store.
//
// The destination address of a packet enters the chip and the chip returns an
// index (the 15-bit next hop) into an external memory that holds the output
// port information. Inside:
//   * tbl24 / tbllong  the two DIR-24-8-BASIC tables (2^24 x 16 and 2^23 x 15 bits)
//   * lookup_alu       the pipelined lookup (one address per clock, result 3
//                      cycles later) and the route update engine
//   * ninec_compressor 9C compression of each inserted route prefix, with the
//                      bits past the prefix length as don't-cares
//   * onchip_mem       2^13 rows of 144 bits holding one compressed route per row
//   * ninec_decompressor  reads a stored route back
// The tables, lookup steps, 9C code and row memory geometry follow the scheme the
// design implements. Keeping a compressed copy of every inserted route in the
// row memory (so that software can read the routing table back from the chip),
// the command interface and the read-back port are this design's choices.
//
// Interfaces (all on clk, synchronous active-low rst_n):
//   lookup    lk_valid/lk_ready/lk_addr in; res_valid/res_addr/res_index out,
//             res_long set when the second table was used. res_index 0 means no
//             route. lk_ready drops for one cycle when the update engine reads
//             TBL24.
//   commands  cmd_valid/cmd_ready with cmd_op (CLEAR or INSERT), cmd_prefix,
//             cmd_len (0..32) and cmd_nh; upd_done pulses when a command is
//             finished. Insert routes in non-decreasing length after a CLEAR.
//             upd_err_full: a long route was dropped (no free TBLlong block);
//             store_full: the row memory is full and the route was not stored
//             (it is still written into the tables).
//   read-back rb_en with rb_row; one cycle later rb_valid with the stored route
//             (prefix with the bits past its length zeroed, length, next hop,
//             compressed length in bits).
// Row bits 143:75 are written as 0 and not read back; verilator reports them as
// unused, which stands: a route needs 75 of the 144 bits of a row.
module ip_lookup_chip
  import iplk_pkg::*;
#(
  parameter int unsigned LONG_BLOCKS = 2**iplk_pkg::PTR_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // lookups
  input  logic                  lk_valid,
  output logic                  lk_ready,
  input  logic [ADDR_W-1:0]     lk_addr,
  output logic                  res_valid,
  output logic [ADDR_W-1:0]     res_addr,
  output logic [NH_W-1:0]       res_index,
  output logic                  res_long,
  // route commands
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  cmd_op_t               cmd_op,
  input  logic [ADDR_W-1:0]     cmd_prefix,
  input  logic [LEN_W-1:0]      cmd_len,
  input  logic [NH_W-1:0]       cmd_nh,
  output logic                  upd_busy,
  output logic                  upd_done,
  output logic                  upd_err_full,
  output logic [PTR_W:0]        blocks_used,
  output logic                  lk_stall,
  // compressed route store
  output logic [ROW_ADDR_W:0]   routes_stored,
  output logic                  store_full,
  input  logic                  rb_en,
  input  logic [ROW_ADDR_W-1:0] rb_row,
  output logic                  rb_valid,
  output logic [ADDR_W-1:0]     rb_prefix,
  output logic [LEN_W-1:0]      rb_len,
  output logic [NH_W-1:0]       rb_nh,
  output logic [NC_LEN_W-1:0]   rb_code_len
);

  localparam int unsigned TL_W = PTR_W + ADDR_W - IDX_W;
  localparam int unsigned ROWS = 2**ROW_ADDR_W;

  // ---------------------------------------------------------------- tables
  logic              t24_rd_en, t24_wr_en;
  logic [IDX_W-1:0]  t24_rd_addr, t24_wr_addr;
  logic [NH_W:0]     t24_rd_data, t24_wr_data;
  logic              tl_rd_en, tl_wr_en;
  logic [TL_W-1:0]   tl_rd_addr, tl_wr_addr;
  logic [NH_W-1:0]   tl_rd_data, tl_wr_data;

  tbl24 u_tbl24 (
    .clk,
    .rd_en  (t24_rd_en),  .rd_addr(t24_rd_addr), .rd_data(t24_rd_data),
    .wr_en  (t24_wr_en),  .wr_addr(t24_wr_addr), .wr_data(t24_wr_data)
  );

  tbllong u_tbllong (
    .clk,
    .rd_en  (tl_rd_en),   .rd_addr(tl_rd_addr),  .rd_data(tl_rd_data),
    .wr_en  (tl_wr_en),   .wr_addr(tl_wr_addr),  .wr_data(tl_wr_data)
  );

  // ---------------------------------------------------------------- ALU
  lookup_alu #(.LONG_BLOCKS(LONG_BLOCKS)) u_alu (
    .clk, .rst_n,
    .lk_valid, .lk_ready, .lk_addr,
    .res_valid, .res_addr, .res_nh(res_index), .res_long,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_prefix, .cmd_len, .cmd_nh,
    .upd_busy, .upd_done, .upd_err_full, .blocks_used, .lk_stall,
    .t24_rd_en, .t24_rd_addr, .t24_rd_data,
    .t24_wr_en, .t24_wr_addr, .t24_wr_data,
    .tl_rd_en, .tl_rd_addr, .tl_rd_data,
    .tl_wr_en, .tl_wr_addr, .tl_wr_data
  );

  // ---------------------------------------------------------------- 9C store
  logic [ADDR_W-1:0]   care;
  logic [LEN_W-1:0]    len_c;
  logic [NC_MAX-1:0]   code;
  logic [NC_LEN_W-1:0] code_len;
  logic [4*NC_BLOCKS-1:0] case_nos_unused;
  route_row_t          wr_row, rd_row;
  logic [ROW_W-1:0]    rd_word;
  logic                st_wr_en;

  assign len_c = (cmd_len > LEN_W'(ADDR_W)) ? LEN_W'(ADDR_W) : cmd_len;
  assign care  = ~({ADDR_W{1'b1}} >> len_c);

  ninec_compressor u_comp (
    .data    (cmd_prefix),
    .care    (care),
    .code    (code),
    .code_len(code_len),
    .case_nos(case_nos_unused)
  );

  assign wr_row     = '{code_len: code_len, code: code, plen: len_c, nh: cmd_nh};
  assign store_full = (routes_stored == (ROW_ADDR_W+1)'(ROWS));
  assign st_wr_en   = cmd_valid && cmd_ready && (cmd_op == CMD_INSERT) && !store_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      routes_stored <= '0;
      rb_valid      <= 1'b0;
    end else begin
      rb_valid <= rb_en;
      if (cmd_valid && cmd_ready && (cmd_op == CMD_CLEAR)) routes_stored <= '0;
      else if (st_wr_en)                                   routes_stored <= routes_stored + 1'b1;
    end
  end

  a_store_bound: assert property (@(posedge clk) disable iff (!rst_n)
    routes_stored <= (ROW_ADDR_W+1)'(ROWS));

  onchip_mem u_store (
    .clk,
    .rd_en  (rb_en),
    .rd_addr(rb_row),
    .rd_data(rd_word),
    .wr_en  (st_wr_en),
    .wr_addr(routes_stored[ROW_ADDR_W-1:0]),
    .wr_data(ROW_W'(wr_row))
  );

  logic [ADDR_W-1:0] dec_data;
  logic [NC_LEN_W-1:0] dec_len_unused;

  assign rd_row = route_row_t'(rd_word[$bits(route_row_t)-1:0]);

  ninec_decompressor u_decomp (
    .code    (rd_row.code),
    .data    (dec_data),
    .code_len(dec_len_unused)
  );

  assign rb_prefix   = dec_data & ~({ADDR_W{1'b1}} >> rd_row.plen);
  assign rb_len      = rd_row.plen;
  assign rb_nh       = rd_row.nh;
  assign rb_code_len = rd_row.code_len;

endmodule
