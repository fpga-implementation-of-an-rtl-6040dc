// iplk_pkg: types and constants shared by the IP route lookup chip.
//
// The lookup follows the DIR-24-8-BASIC scheme: a first table (TBL24) indexed by
// the top 24 address bits and a second table (TBLlong) of 256-entry blocks for
// prefixes longer than 24 bits. A TBL24 entry is 16 bits: one flag bit and a
// 15-bit field that is either the next hop (flag 0) or the number of a TBLlong
// block (flag 1). These widths are the ones the scheme defines; the command
// encoding, the "next hop 0 means no route" convention and the layout of a
// compressed route row are choices of this design.
package iplk_pkg;

  // Widths of the IPv4 configuration.
  localparam int unsigned ADDR_W = 32;  // destination address
  localparam int unsigned IDX_W  = 24;  // TBL24 index = address bits 31:8
  localparam int unsigned PTR_W  = 15;  // TBLlong block number
  localparam int unsigned NH_W   = 15;  // next hop / port information index
  localparam int unsigned LEN_W  = 6;   // prefix length 0..32

  // One TBL24 entry (Figure 1 layout, flag in bit 15).
  typedef struct packed {
    logic             is_ptr;  // 1: val points to a TBLlong block
    logic [NH_W-1:0]  val;     // next hop or block number
  } tbl24_entry_t;

  // Route update commands.
  typedef enum logic [0:0] {
    CMD_CLEAR  = 1'b0,  // empty both tables (next hop 0 everywhere)
    CMD_INSERT = 1'b1   // add one route
  } cmd_op_t;

  // 9C nine-coded compression of a 32-bit prefix in 8-bit blocks.
  localparam int unsigned NC_K      = 8;
  localparam int unsigned NC_BLOCKS = ADDR_W / NC_K;          // 4
  localparam int unsigned NC_CW_MAX = NC_K + 4;               // case 9: 1111 + K bits
  localparam int unsigned NC_MAX    = NC_BLOCKS * NC_CW_MAX;  // 48
  localparam int unsigned NC_LEN_W  = 6;                      // 0..48

  // On-chip memory geometry: 2^13 rows of 144 bits.
  localparam int unsigned ROW_W      = 144;
  localparam int unsigned ROW_ADDR_W = 13;

  // One compressed route as stored in an on-chip row (low 75 bits; the rest zero).
  typedef struct packed {
    logic [NC_LEN_W-1:0] code_len;  // number of valid code bits
    logic [NC_MAX-1:0]   code;      // 9C bit string, first bit in the MSB
    logic [LEN_W-1:0]    plen;      // prefix length
    logic [NH_W-1:0]     nh;        // next hop
  } route_row_t;

endpackage
