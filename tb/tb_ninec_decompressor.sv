// tb_ninec_decompressor: round trip through the 9C code.
//
// Random ternary words are compressed by the reference model and fed to the
// decompressor. The decoded word must agree with the input on every cared-for
// bit, must equal the reference's choice for the don't-care bits (the payload
// carries them as 0, constant halves as the constant) and the consumed length
// must equal the code length. Words built to hit each of the nine cases in every
// block position are included.
module tb_ninec_decompressor;
  import ninec_ref_pkg::*;

  logic [47:0] code;
  logic [31:0] data;
  logic [5:0]  code_len;
  int checks = 0, failures = 0;

  ninec_decompressor #(.W(32), .K(8)) dut (.code, .data, .code_len);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected decoded block for a reference case.
  function automatic bit [7:0] expect_block(bit [7:0] d, bit [7:0] c);
    int cn;
    bitq_t q = enc_block(d, c, cn);
    bit [7:0] f = d & c;
    case (cn)
      1: return 8'h00;
      2: return 8'hFF;
      3: return 8'h0F;
      4: return 8'hF0;
      5: return {4'hF, f[3:0]};
      6: return {f[7:4], 4'hF};
      7: return {4'h0, f[3:0]};
      8: return {f[7:4], 4'h0};
      default: return f;
    endcase
  endfunction

  task automatic run(bit [31:0] d, bit [31:0] c);
    bit [47:0] rc;
    int rl;
    bit [31:0] exp_d;
    compress(d, c, rc, rl);
    for (int b = 0; b < 4; b++) exp_d[31-8*b -: 8] = expect_block(d[31-8*b -: 8], c[31-8*b -: 8]);
    code = rc;
    #1;
    checks++;
    if (((data ^ d) & c) != 0 || data != exp_d || code_len != 6'(rl)) begin
      failures++;
      if (failures < 10)
        $display("FAIL d=%h c=%h code=%h: got %h/%0d want %h/%0d", d, c, rc, data,
                 code_len, exp_d, rl);
    end
  endtask

  initial begin
    bit [7:0] pat_d [9] = '{8'h00, 8'hFF, 8'h0F, 8'hF0, 8'hF5, 8'h5F, 8'h05, 8'h50, 8'h5A};
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 9; j++)
        run({pat_d[i], pat_d[j], pat_d[(i+j)%9], pat_d[(i+2*j)%9]}, '1);
    for (int i = 0; i < 30000; i++) run($urandom, $urandom | $urandom);
    for (int i = 0; i < 10000; i++) run($urandom, $urandom & $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
