// route_update: writes routes into TBL24 and TBLlong.
//
// A route is a prefix, its length and a next hop. The engine stores it the way
// the DIR-24-8-BASIC scheme lays out its tables:
//   * length <= 24: the prefix is expanded over TBL24. Every entry whose index
//     starts with the prefix gets {flag 0, next hop}: 2^(24-len) writes, one per
//     clock (a /16 covers 256 entries).
//   * length > 24: the TBL24 entry at prefix[31:8] is read. If it already points
//     to a TBLlong block, only the 2^(32-len) entries of the route are written in
//     that block. Otherwise the next free block is allocated, the TBL24 entry is
//     rewritten as {flag 1, block}, and all 256 entries of the block are written:
//     those inside the route get its next hop, the others the next hop the TBL24
//     entry held before (the shorter route that covered these addresses).
// CMD_CLEAR writes {flag 0, next hop 0} into all of TBL24 and frees all blocks;
// next hop 0 stands for "no route". Both the clear command and the convention are
// this design's own, as is the sequential block allocation (0, 1, 2, ...).
//
// Routes must be inserted in order of non-decreasing prefix length after a clear,
// the order in which a longer, more specific route overwrites a shorter one. A
// long route that finds no free block is dropped and sets the sticky err_full.
// Lengths above ADDR_W are treated as ADDR_W.
//
// Interface: cmd_valid/cmd_ready handshake; cmd_ready is high only in the idle
// state, and done pulses for one cycle when a command has been carried out. The
// engine's TBL24 read (t24_rd_en) must be served on the cycle it is raised, and
// the data must arrive on the next cycle. Writes take effect at the clock edge.
// done pulses the cycle after the last write: a route of length L <= 24 is done
// 2^(24-L)+1 cycles after it is accepted, a new-block route 256+3 cycles after.
// Synchronous active-low reset returns to idle with no blocks allocated (the
// tables themselves are only emptied by CMD_CLEAR).
module route_update
#(
  parameter int unsigned ADDR_W      = iplk_pkg::ADDR_W,
  parameter int unsigned IDX_W       = iplk_pkg::IDX_W,
  parameter int unsigned PTR_W       = iplk_pkg::PTR_W,
  parameter int unsigned NH_W        = iplk_pkg::NH_W,
  parameter int unsigned LEN_W       = iplk_pkg::LEN_W,
  parameter int unsigned LONG_BLOCKS = 2**PTR_W   // TBLlong blocks that may be allocated
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // commands
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  iplk_pkg::cmd_op_t             cmd_op,
  input  logic [ADDR_W-1:0]             cmd_prefix,
  input  logic [LEN_W-1:0]              cmd_len,
  input  logic [NH_W-1:0]               cmd_nh,
  // TBL24 read port (served with priority)
  output logic                          t24_rd_en,
  output logic [IDX_W-1:0]              t24_rd_addr,
  input  logic [NH_W:0]                 t24_rd_data,
  // TBL24 write port
  output logic                          t24_wr_en,
  output logic [IDX_W-1:0]              t24_wr_addr,
  output logic [NH_W:0]                 t24_wr_data,
  // TBLlong write port
  output logic                          tl_wr_en,
  output logic [PTR_W+ADDR_W-IDX_W-1:0] tl_wr_addr,
  output logic [NH_W-1:0]               tl_wr_data,
  // status
  output logic                          busy,
  output logic                          done,
  output logic                          err_full,
  output logic [PTR_W:0]                blocks_used
);

  localparam int unsigned LOW_W = ADDR_W - IDX_W;

  typedef enum logic [2:0] {
    S_IDLE, S_CLEAR, S_SHORT, S_RD24, S_WAIT24, S_FILL, S_LONGW
  } state_t;

  state_t             state;
  logic [IDX_W-1:0]   idx;       // TBL24 write pointer
  logic [IDX_W-1:0]   idx_last;  // last TBL24 entry of the range
  logic [LOW_W-1:0]   lo;        // TBLlong entry within the block
  logic [LOW_W-1:0]   lo_first;  // first entry of the route in the block
  logic [LOW_W-1:0]   lo_last;   // last entry of the route in the block
  logic [PTR_W-1:0]   blk;       // block being written
  logic [NH_W-1:0]    nh;        // next hop of the route
  logic [NH_W-1:0]    cover_nh;     // next hop the TBL24 entry held before
  logic [IDX_W-1:0]   prefix_hi;  // prefix[31:8] of a long route

  // Masks of the command's prefix at the two levels.
  logic [LEN_W-1:0]   len_c;
  logic [IDX_W-1:0]   hi_mask;
  logic [LOW_W-1:0]   lo_mask;

  always_comb begin
    len_c   = (cmd_len > LEN_W'(ADDR_W)) ? LEN_W'(ADDR_W) : cmd_len;
    hi_mask = (len_c >= LEN_W'(IDX_W)) ? '1 : ~({IDX_W{1'b1}} >> len_c);
    lo_mask = (len_c <= LEN_W'(IDX_W)) ? '0 : ~({LOW_W{1'b1}} >> (len_c - LEN_W'(IDX_W)));
  end

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  assign t24_rd_en   = (state == S_RD24);
  assign t24_rd_addr = prefix_hi;

  logic in_route;
  assign in_route = (lo >= lo_first) && (lo <= lo_last);

  always_comb begin
    t24_wr_en   = 1'b0;
    t24_wr_addr = idx;
    t24_wr_data = {1'b0, nh};
    tl_wr_en    = 1'b0;
    tl_wr_addr  = {blk, lo};
    tl_wr_data  = nh;
    unique case (state)
      S_CLEAR: begin
        t24_wr_en   = 1'b1;
        t24_wr_data = '0;
      end
      S_SHORT: t24_wr_en = 1'b1;
      S_WAIT24: begin
        // allocate a block: point the TBL24 entry at it
        if (!t24_rd_data[NH_W] && (blocks_used < (PTR_W+1)'(LONG_BLOCKS))) begin
          t24_wr_en   = 1'b1;
          t24_wr_addr = prefix_hi;
          t24_wr_data = {1'b1, NH_W'(blocks_used)};
        end
      end
      S_FILL: begin
        tl_wr_en   = 1'b1;
        tl_wr_data = in_route ? nh : cover_nh;
      end
      S_LONGW: tl_wr_en = 1'b1;
      default: ;
    endcase
  end

  // A command is only taken when idle, and done ends every busy period.
  a_ready_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_ready == (state == S_IDLE));
  a_done_to_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (state == S_IDLE));
  a_blocks_bound: assert property (@(posedge clk) disable iff (!rst_n)
    blocks_used <= (PTR_W+1)'(LONG_BLOCKS));

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (!rst_n) begin
      state       <= S_IDLE;
      blocks_used <= '0;
      err_full    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          prefix_hi <= cmd_prefix[ADDR_W-1 -: IDX_W];
          nh       <= cmd_nh;
          idx      <= cmd_prefix[ADDR_W-1 -: IDX_W] & hi_mask;
          idx_last <= cmd_prefix[ADDR_W-1 -: IDX_W] | ~hi_mask;
          lo_first <= cmd_prefix[LOW_W-1:0] & lo_mask;
          lo_last  <= cmd_prefix[LOW_W-1:0] | ~lo_mask;
          if (cmd_op == iplk_pkg::CMD_CLEAR) begin
            idx      <= '0;
            idx_last <= '1;
            state    <= S_CLEAR;
          end else if (len_c <= LEN_W'(IDX_W)) begin
            state <= S_SHORT;
          end else begin
            state <= S_RD24;
          end
        end
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == idx_last) begin
            blocks_used <= '0;
            err_full    <= 1'b0;
            done        <= 1'b1;
            state       <= S_IDLE;
          end
        end
        S_SHORT: begin
          idx <= idx + 1'b1;
          if (idx == idx_last) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_RD24: state <= S_WAIT24;
        S_WAIT24: begin
          if (t24_rd_data[NH_W]) begin
            blk   <= t24_rd_data[PTR_W-1:0];
            lo    <= lo_first;
            state <= S_LONGW;
          end else if (blocks_used < (PTR_W+1)'(LONG_BLOCKS)) begin
            blk         <= blocks_used[PTR_W-1:0];
            blocks_used <= blocks_used + 1'b1;
            cover_nh       <= t24_rd_data[NH_W-1:0];
            lo          <= '0;
            state       <= S_FILL;
          end else begin
            err_full <= 1'b1;
            done     <= 1'b1;
            state    <= S_IDLE;
          end
        end
        S_FILL: begin
          lo <= lo + 1'b1;
          if (lo == '1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_LONGW: begin
          lo <= lo + 1'b1;
          if (lo == lo_last) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
