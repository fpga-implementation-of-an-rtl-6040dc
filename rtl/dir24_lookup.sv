// dir24_lookup: pipelined DIR-24-8-BASIC route lookup.
//
// A destination address is looked up in at most two memory reads, one in each
// table, so the two reads can overlap for consecutive addresses and one address
// is accepted every clock:
//   stage 0  read TBL24 at addr[31:8]
//   stage 1  TBL24 entry arrives. Flag 0: the entry's 15 bits are the next hop.
//            Flag 1: read TBLlong at entry*256 + addr[7:0], formed by
//            concatenating the block number and the low address byte.
//   stage 2  TBLlong entry arrives (if it was read); the next hop is selected
//            and registered.
// The lookup steps are those of the DIR-24-8 scheme; the exact staging is this
// design's choice.
//
// Interface: in_valid/in_ready handshake on the input; in_ready follows t24_gnt,
// which the owner of the shared TBL24 read port drives low while it uses the
// port. The pipeline never stalls after accepting an address: out_valid rises
// exactly 3 cycles after an address is accepted, with the next hop in out_nh,
// the address in out_addr and out_long set when TBLlong supplied the result.
// Both memories must have a one-cycle registered read. Synchronous active-low
// reset clears the valid bits only.
module dir24_lookup #(
  parameter int unsigned ADDR_W = iplk_pkg::ADDR_W,
  parameter int unsigned IDX_W  = iplk_pkg::IDX_W,
  parameter int unsigned PTR_W  = iplk_pkg::PTR_W,
  parameter int unsigned NH_W   = iplk_pkg::NH_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // lookup requests
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [ADDR_W-1:0]       in_addr,
  // TBL24 read port
  input  logic                    t24_gnt,
  output logic                    t24_rd_en,
  output logic [IDX_W-1:0]        t24_rd_addr,
  input  logic [NH_W:0]           t24_rd_data,
  // TBLlong read port
  output logic                    tl_rd_en,
  output logic [PTR_W+ADDR_W-IDX_W-1:0] tl_rd_addr,
  input  logic [NH_W-1:0]         tl_rd_data,
  // results
  output logic                    out_valid,
  output logic [ADDR_W-1:0]       out_addr,
  output logic [NH_W-1:0]         out_nh,
  output logic                    out_long
);

  localparam int unsigned LOW_W = ADDR_W - IDX_W;

  initial begin
    assert (PTR_W <= NH_W) else $error("block number must fit the TBL24 entry");
  end

  // stage 1: TBL24 data is on t24_rd_data
  logic              s1_valid;
  logic [ADDR_W-1:0] s1_addr;
  // stage 2: TBLlong data is on tl_rd_data
  logic              s2_valid;
  logic [ADDR_W-1:0] s2_addr;
  logic              s2_long;
  logic [NH_W-1:0]   s2_nh;

  logic              s1_is_ptr;
  logic [NH_W-1:0]   s1_val;

  assign in_ready    = t24_gnt;
  assign t24_rd_en   = in_valid && t24_gnt;
  assign t24_rd_addr = in_addr[ADDR_W-1 -: IDX_W];

  assign s1_is_ptr   = t24_rd_data[NH_W];
  assign s1_val      = t24_rd_data[NH_W-1:0];
  assign tl_rd_en    = s1_valid && s1_is_ptr;
  assign tl_rd_addr  = {s1_val[PTR_W-1:0], s1_addr[LOW_W-1:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s2_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= t24_rd_en;
      s2_valid  <= s1_valid;
      out_valid <= s2_valid;
    end
    s1_addr  <= in_addr;
    s2_addr  <= s1_addr;
    s2_long  <= s1_is_ptr;
    s2_nh    <= s1_val;
    out_addr <= s2_addr;
    out_long <= s2_long;
    out_nh   <= s2_long ? tl_rd_data : s2_nh;
  end

endmodule
