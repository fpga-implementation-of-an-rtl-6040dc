// ninec_ref_pkg: reference model of the 9C (nine-coded) code for the testbenches.
//
// Written independently of the RTL: a block is encoded by trying every case's
// pattern bit by bit (0, 1 or "anything" per half) in order of increasing code
// length, and the codeword bit strings are built as text-like bit queues.
package ninec_ref_pkg;

  typedef bit bitq_t[$];

  // Can the bits [hi:lo] of (d, c) all take value v?
  function automatic bit half_is(bit [7:0] d, bit [7:0] c, int hi, int lo, bit v);
    for (int i = lo; i <= hi; i++)
      if (c[i] && d[i] != v) return 0;
    return 1;
  endfunction

  // Encode one 8-bit block; returns the bit queue and the case number.
  function automatic bitq_t enc_block(bit [7:0] d, bit [7:0] c, output int case_no);
    bitq_t q;
    bit l0 = half_is(d, c, 7, 4, 0), l1 = half_is(d, c, 7, 4, 1);
    bit r0 = half_is(d, c, 3, 0, 0), r1 = half_is(d, c, 3, 0, 1);
    bit [7:0] f = d & c;
    string cw;
    int hi = -1, lo = -1;
    if      (l0 && r0) begin case_no = 1; cw = "0"; end
    else if (l1 && r1) begin case_no = 2; cw = "10"; end
    else if (l0 && r1) begin case_no = 3; cw = "11000"; end
    else if (l1 && r0) begin case_no = 4; cw = "11001"; end
    else if (l1)       begin case_no = 5; cw = "11010"; hi = 3; lo = 0; end
    else if (r1)       begin case_no = 6; cw = "11011"; hi = 7; lo = 4; end
    else if (l0)       begin case_no = 7; cw = "11100"; hi = 3; lo = 0; end
    else if (r0)       begin case_no = 8; cw = "11101"; hi = 7; lo = 4; end
    else               begin case_no = 9; cw = "1111";  hi = 7; lo = 0; end
    for (int i = 0; i < cw.len(); i++) q.push_back(cw[i] == "1");
    if (hi >= 0) for (int i = hi; i >= lo; i--) q.push_back(f[i]);
    return q;
  endfunction

  // Compress a 32-bit ternary word into a 48-bit left-aligned string.
  function automatic void compress(bit [31:0] d, bit [31:0] c,
                                   output bit [47:0] code, output int len);
    bitq_t all;
    int cn;
    for (int b = 0; b < 4; b++) begin
      bitq_t q = enc_block(d[31-8*b -: 8], c[31-8*b -: 8], cn);
      foreach (q[i]) all.push_back(q[i]);
    end
    code = '0;
    foreach (all[i]) code[47-i] = all[i];
    len = all.size();
  endfunction

  // Parse a string of the form "00xx1001..." (MSB first) into value and care.
  function automatic void parse_ternary(string s, output bit [31:0] d, output bit [31:0] c);
    d = '0; c = '0;
    for (int i = 0; i < s.len() && i < 32; i++) begin
      c[31-i] = (s[i] != "x");
      d[31-i] = (s[i] == "1");
    end
  endfunction

endpackage
