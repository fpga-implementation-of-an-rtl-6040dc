// tb_ninec_block_enc: exhaustive check of the 9C block encoder (K = 8).
//
// Every combination of an 8-bit value and an 8-bit care mask (65536 cases) is
// applied; the codeword, its length and the case number are compared with the
// reference encoder in ninec_ref_pkg. Each of the nine cases must occur.
module tb_ninec_block_enc;
  import ninec_ref_pkg::*;

  logic [7:0]  data, care;
  logic [11:0] code;
  logic [3:0]  code_len;
  logic [3:0]  case_no;
  int checks = 0, failures = 0;
  int seen [10];

  ninec_block_enc #(.K(8)) dut (.data, .care, .code, .code_len, .case_no);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 65536; v++) begin
      bitq_t q;
      int cn;
      logic [11:0] exp_code;
      data = v[15:8];
      care = v[7:0];
      #1;
      q = enc_block(data, care, cn);
      exp_code = '0;
      foreach (q[i]) exp_code[11-i] = q[i];
      checks++;
      if (code !== exp_code || code_len != 4'(q.size()) || case_no != 4'(cn)) begin
        failures++;
        if (failures < 10)
          $display("FAIL d=%b c=%b: got %b/%0d case %0d, want %b/%0d case %0d",
                   data, care, code, code_len, case_no, exp_code, q.size(), cn);
      end
      seen[cn]++;
    end
    for (int c = 1; c <= 9; c++) begin
      checks++;
      if (seen[c] == 0) begin
        failures++;
        $display("FAIL case %0d never produced", c);
      end
    end
    $display("cases seen: %p", seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
