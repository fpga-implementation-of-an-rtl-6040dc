// ninec_compressor: 9C compression of a W-bit ternary prefix.
//
// The prefix (value plus care mask; care 0 marks a don't-care bit, such as the
// bits past a route's prefix length) is cut into W/K blocks of K bits, first
// block at the MSB. Each block is encoded by ninec_block_enc and the codewords
// are concatenated in block order into one bit string. For W = 32, K = 8 the
// string is 4 to 48 bits long. The block size and code are the 9C scheme's; the
// left-aligned output format is this design's.
//
// Interface: purely combinational. code is left-aligned (first bit in the MSB,
// bits past code_len are 0); case_nos gives the case chosen for each block,
// block 0 (the MSBs) in the top nibble.
module ninec_compressor #(
  parameter int unsigned W   = iplk_pkg::ADDR_W,
  parameter int unsigned K   = iplk_pkg::NC_K,
  localparam int unsigned NB  = W / K,
  localparam int unsigned CW  = K + 4,
  localparam int unsigned CLW = $clog2(CW + 1),
  localparam int unsigned MAX = NB * CW,
  localparam int unsigned LW  = $clog2(MAX + 1)
) (
  input  logic [W-1:0]    data,
  input  logic [W-1:0]    care,
  output logic [MAX-1:0]  code,
  output logic [LW-1:0]   code_len,
  output logic [4*NB-1:0] case_nos
);

  initial begin
    assert (W % K == 0) else $error("W must be a multiple of K");
  end

  logic [CW-1:0]  blk_code [NB];
  logic [CLW-1:0] blk_len  [NB];

  for (genvar b = 0; b < NB; b++) begin : g_blk
    // block b holds bits W-1-b*K downto W-(b+1)*K
    ninec_block_enc #(.K(K)) u_enc (
      .data    (data[W-1-b*K -: K]),
      .care    (care[W-1-b*K -: K]),
      .code    (blk_code[b]),
      .code_len(blk_len[b]),
      .case_no (case_nos[4*NB-1-4*b -: 4])
    );
  end

  always_comb begin
    logic [LW-1:0] pos;
    pos  = '0;
    code = '0;
    for (int b = 0; b < NB; b++) begin
      code = code | ({blk_code[b], {(MAX-CW){1'b0}}} >> pos);
      pos  = pos + LW'(blk_len[b]);
    end
    code_len = pos;
  end

endmodule
