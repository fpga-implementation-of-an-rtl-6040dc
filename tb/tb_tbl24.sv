// tb_tbl24: checks the TBL24 route table (2^24 x 16 bits) at its full size.
//
// Writes random data to random addresses (both ends of the address range
// included), keeping a copy in an associative array, then reads every written
// address back and checks the data arrives exactly one cycle after rd_en, that
// rd_data holds while rd_en is low, and that a read and a write of the same
// address in one cycle return the old contents.
module tb_tbl24;
  localparam int AW = 24;
  localparam int DW = 16;

  logic          clk = 1'b0;
  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [DW-1:0] rd_data, wr_data = '0;
  logic [DW-1:0] model [logic [AW-1:0]];
  int checks = 0, failures = 0;

  tbl24 dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] rand_data();
    logic [DW-1:0] v;
    for (int i = 0; i < DW; i += 32) v = (v << 32) | DW'($urandom);
    return v;
  endfunction

  task automatic check(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", what, got, exp);
    end
  endtask

  initial begin
    logic [AW-1:0] addrs [$];
    logic [DW-1:0] held;
    addrs.push_back('0);
    addrs.push_back('1);
    for (int i = 0; i < 3000; i++) addrs.push_back(AW'($urandom));
    // writes
    foreach (addrs[i]) begin
      @(negedge clk);
      wr_en   = 1'b1;
      wr_addr = addrs[i];
      wr_data = rand_data();
      model[addrs[i]] = wr_data;
    end
    @(negedge clk);
    wr_en = 1'b0;
    // reads, one per cycle
    foreach (addrs[i]) begin
      @(negedge clk);
      rd_en   = 1'b1;
      rd_addr = addrs[i];
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_data, model[addrs[i]], "read");
      held = rd_data;
      @(negedge clk);
      check(rd_data, held, "hold");
    end
    // read-during-write of one address returns the old data
    @(negedge clk);
    rd_en = 1'b1; rd_addr = addrs[5];
    wr_en = 1'b1; wr_addr = addrs[5]; wr_data = ~model[addrs[5]];
    @(negedge clk);
    rd_en = 1'b0; wr_en = 1'b0;
    check(rd_data, model[addrs[5]], "read during write");
    model[addrs[5]] = ~model[addrs[5]];
    rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
    check(rd_data, model[addrs[5]], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
