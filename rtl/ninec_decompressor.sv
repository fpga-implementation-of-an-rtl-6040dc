// ninec_decompressor: decodes a 9C bit string back into a W-bit word.
//
// Reads W/K codewords from a left-aligned bit string (the format ninec_compressor
// produces) and rebuilds each K-bit block from the nine-codeword table: 0 gives
// all zeros, 10 all ones, 11000/11001 the two 0/1 half pairs, 11010..11101 one
// constant half plus the K/2 bits that follow, 1111 the K bits that follow.
// Positions that were don't-care on compression come back with the value the
// encoder chose for them. Decoding is the inverse of the 9C code table; the
// decoder's structure is this design's.
//
// Interface: purely combinational; code_len returns the number of bits consumed.
module ninec_decompressor #(
  parameter int unsigned W   = iplk_pkg::ADDR_W,
  parameter int unsigned K   = iplk_pkg::NC_K,
  localparam int unsigned NB  = W / K,
  localparam int unsigned CW  = K + 4,
  localparam int unsigned MAX = NB * CW,
  localparam int unsigned LW  = $clog2(MAX + 1)
) (
  input  logic [MAX-1:0] code,
  output logic [W-1:0]   data,
  output logic [LW-1:0]  code_len
);

  localparam int unsigned H = K / 2;

  always_comb begin
    logic [LW-1:0]  pos;
    logic [MAX-1:0] win;
    logic [K-1:0]   blk;
    pos  = '0;
    data = '0;
    for (int b = 0; b < NB; b++) begin
      win = code << pos;
      if (!win[MAX-1]) begin                 // 0
        blk = '0;
        pos = pos + LW'(1);
      end else if (!win[MAX-2]) begin        // 10
        blk = '1;
        pos = pos + LW'(2);
      end else if (win[MAX-3 -: 2] == 2'b11) begin  // 1111 + block
        blk = win[MAX-5 -: K];
        pos = pos + LW'(4 + K);
      end else begin
        unique case (win[MAX-3 -: 3])
          3'b000:  blk = {{H{1'b0}}, {H{1'b1}}};
          3'b001:  blk = {{H{1'b1}}, {H{1'b0}}};
          3'b010:  blk = {{H{1'b1}}, win[MAX-6 -: H]};
          3'b011:  blk = {win[MAX-6 -: H], {H{1'b1}}};
          3'b100:  blk = {{H{1'b0}}, win[MAX-6 -: H]};
          default: blk = {win[MAX-6 -: H], {H{1'b0}}};  // 101
        endcase
        pos = pos + ((win[MAX-3 -: 2] == 2'b00) ? LW'(5) : LW'(5 + H));
      end
      data[W-1-b*K -: K] = blk;
    end
    code_len = pos;
  end

endmodule
