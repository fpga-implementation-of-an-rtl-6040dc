// tb_ninec_compressor: checks the 9C compression of 32-bit ternary prefixes.
//
// First the two worked examples of the 9C code: prefix T1 compresses to
// 9+2+1+1 = 13 bits and T2 to 1+1+1+1 = 4 bits, 17 bits for the 64 input bits.
// Then random value/care pairs (including route-style masks, where the bits past
// the prefix length are don't-care) are compared with the reference model.
module tb_ninec_compressor;
  import ninec_ref_pkg::*;

  logic [31:0] data, care;
  logic [47:0] code;
  logic [5:0]  code_len;
  logic [15:0] case_nos;
  int checks = 0, failures = 0;

  ninec_compressor #(.W(32), .K(8)) dut (.data, .care, .code, .code_len, .case_nos);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ref(string what);
    bit [47:0] exp_code;
    int exp_len;
    #1;
    compress(data, care, exp_code, exp_len);
    checks++;
    if (code !== exp_code || code_len != 6'(exp_len)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s d=%h c=%h: got %h/%0d want %h/%0d", what, data, care,
                 code, code_len, exp_code, exp_len);
    end
  endtask

  initial begin
    bit [31:0] d, c;
    int total;
    // worked examples
    parse_ternary("00xx1001xx11111xxxxx0xxxxx00xx0x", d, c);
    data = d; care = c; check_ref("T1");
    checks++;
    if (code_len != 6'd13 || case_nos != 16'h7211) begin
      failures++;
      $display("FAIL T1: len %0d cases %h, want 13 and 7211", code_len, case_nos);
    end
    total = int'(code_len);
    parse_ternary("xxxxxx0xxx0xxxxx0x0xxx0xxxx00xxx", d, c);
    data = d; care = c; check_ref("T2");
    checks++;
    if (code_len != 6'd4 || case_nos != 16'h1111) begin
      failures++;
      $display("FAIL T2: len %0d cases %h, want 4 and 1111", code_len, case_nos);
    end
    total += int'(code_len);
    checks++;
    if (total != 17) begin
      failures++;
      $display("FAIL total %0d, want 17", total);
    end
    // fully specified extremes
    data = 32'h0000_0000; care = '1; check_ref("zeros");
    data = 32'hFFFF_FFFF; care = '1; check_ref("ones");
    data = 32'h0F_F0_5A_A5; care = '1; check_ref("mixed");
    // random ternary words
    for (int i = 0; i < 20000; i++) begin
      data = $urandom;
      care = $urandom & $urandom;
      check_ref("rand");
    end
    // route prefixes: care = top len bits
    for (int i = 0; i < 20000; i++) begin
      int len;
      len = $urandom_range(0, 32);
      data = $urandom;
      care = (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
      check_ref("route");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
