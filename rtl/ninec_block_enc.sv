// ninec_block_enc: nine-coded (9C) encoder for one K-bit block.
//
// The block is given as a value and a care mask; a bit whose care bit is 0 is a
// don't-care and may be encoded as either 0 or 1. Each half of the block (the
// left half is the upper K/2 bits) is classed as "can be all 0", "can be all 1"
// or mismatch, and the block gets one of nine prefix-free codewords:
//   case 1  0000 0000   0
//   case 2  1111 1111   10
//   case 3  0000 1111   11000
//   case 4  1111 0000   11001
//   case 5  1111 xxxx   11010 + right half
//   case 6  xxxx 1111   11011 + left half
//   case 7  0000 xxxx   11100 + right half
//   case 8  xxxx 0000   11101 + left half
//   case 9  xxxx xxxx   1111  + whole block
// The codeword table is the 9C code. Where a block fits several cases this
// design takes the lowest case number, which always gives a shortest code (cases
// are ordered by length); the half or block that is sent along has its
// don't-care bits set to 0.
//
// Interface: purely combinational. code holds the codeword and its payload
// left-aligned (first bit in the MSB, unused low bits 0); code_len is the number
// of valid bits (1 to K+4); case_no is the case number 1..9.
module ninec_block_enc #(
  parameter int unsigned K     = iplk_pkg::NC_K,
  parameter int unsigned CW    = K + 4,           // longest code
  parameter int unsigned CLW   = $clog2(CW + 1)
) (
  input  logic [K-1:0]   data,
  input  logic [K-1:0]   care,
  output logic [CW-1:0]  code,
  output logic [CLW-1:0] code_len,
  output logic [3:0]     case_no
);

  localparam int unsigned H = K / 2;

  initial begin
    assert (K % 2 == 0 && K >= 2) else $error("K must be even");
  end

  logic [H-1:0] l_val, r_val, l_care, r_care;
  logic         l0, l1, r0, r1;
  logic [K-1:0] fixed;  // block with don't-cares set to 0

  always_comb begin
    fixed  = data & care;
    l_val  = fixed[K-1:H];
    r_val  = fixed[H-1:0];
    l_care = care[K-1:H];
    r_care = care[H-1:0];
    l0 = (l_val == '0);
    r0 = (r_val == '0);
    l1 = ((~data[K-1:H] & l_care) == '0);
    r1 = ((~data[H-1:0] & r_care) == '0);

    code = '0;
    if (l0 && r0) begin
      case_no  = 4'd1;
      code_len = CLW'(1);
      code[CW-1] = 1'b0;
    end else if (l1 && r1) begin
      case_no  = 4'd2;
      code_len = CLW'(2);
      code[CW-1 -: 2] = 2'b10;
    end else if (l0 && r1) begin
      case_no  = 4'd3;
      code_len = CLW'(5);
      code[CW-1 -: 5] = 5'b11000;
    end else if (l1 && r0) begin
      case_no  = 4'd4;
      code_len = CLW'(5);
      code[CW-1 -: 5] = 5'b11001;
    end else if (l1) begin
      case_no  = 4'd5;
      code_len = CLW'(5 + H);
      code[CW-1 -: 5+H] = {5'b11010, r_val};
    end else if (r1) begin
      case_no  = 4'd6;
      code_len = CLW'(5 + H);
      code[CW-1 -: 5+H] = {5'b11011, l_val};
    end else if (l0) begin
      case_no  = 4'd7;
      code_len = CLW'(5 + H);
      code[CW-1 -: 5+H] = {5'b11100, r_val};
    end else if (r0) begin
      case_no  = 4'd8;
      code_len = CLW'(5 + H);
      code[CW-1 -: 5+H] = {5'b11101, l_val};
    end else begin
      case_no  = 4'd9;
      code_len = CLW'(4 + K);
      code[CW-1 -: 4+K] = {4'b1111, fixed};
    end
  end

endmodule
