// tb_dir24_lookup: checks the pipelined DIR-24-8-BASIC lookup with full-size
// TBL24 and TBLlong memories.
//
// The tables are loaded through their write ports with the worked example of the
// scheme (10.54/16 -> A, 10.54.34/24 -> B, 10.54.34.192/26 -> C, with TBL24 entry
// 10.54.34 pointing to block 123) plus random entries. Addresses are then looked
// up and each result is compared with a lookup done on the testbench's own copy
// of the tables. Also checked: the result appears exactly 3 cycles after the
// address is accepted, a burst of back-to-back lookups gives one result per
// cycle, and a withdrawn grant (t24_gnt low) stalls the input.
module tb_dir24_lookup;
  localparam logic [14:0] NH_A = 15'd101, NH_B = 15'd202, NH_C = 15'd303;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_ready, t24_gnt = 1'b1;
  logic [31:0] in_addr = '0;
  logic        t24_rd_en, tl_rd_en, out_valid, out_long;
  logic [23:0] t24_rd_addr;
  logic [15:0] t24_rd_data;
  logic [22:0] tl_rd_addr;
  logic [14:0] tl_rd_data, out_nh;
  logic [31:0] out_addr;
  // table loading
  logic        t24_we = 1'b0, tl_we = 1'b0;
  logic [23:0] t24_wa = '0;
  logic [15:0] t24_wd = '0;
  logic [22:0] tl_wa = '0;
  logic [14:0] tl_wd = '0;

  logic [15:0] m24 [logic [23:0]];
  logic [14:0] mlong [logic [22:0]];
  logic [23:0] idx_list [$];
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_long = 0, n_short = 0, n_stall = 0;
  logic [7:0] lows [4] = '{8'd0, 8'd191, 8'd192, 8'd255};

  dir24_lookup dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_addr,
    .t24_gnt, .t24_rd_en, .t24_rd_addr, .t24_rd_data,
    .tl_rd_en, .tl_rd_addr, .tl_rd_data,
    .out_valid, .out_addr, .out_nh, .out_long
  );
  tbl24 u_t24 (.clk, .rd_en(t24_rd_en), .rd_addr(t24_rd_addr), .rd_data(t24_rd_data),
               .wr_en(t24_we), .wr_addr(t24_wa), .wr_data(t24_wd));
  tbllong u_tl (.clk, .rd_en(tl_rd_en), .rd_addr(tl_rd_addr), .rd_data(tl_rd_data),
                .wr_en(tl_we), .wr_addr(tl_wa), .wr_data(tl_wd));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic w24(logic [23:0] a, logic [15:0] d);
    @(negedge clk);
    t24_we = 1'b1; t24_wa = a; t24_wd = d;
    m24[a] = d;
    @(negedge clk);
    t24_we = 1'b0;
  endtask
  task automatic wlong(logic [22:0] a, logic [14:0] d);
    @(negedge clk);
    tl_we = 1'b1; tl_wa = a; tl_wd = d;
    mlong[a] = d;
    @(negedge clk);
    tl_we = 1'b0;
  endtask

  function automatic logic [15:0] expect_nh(logic [31:0] a);
    logic [15:0] e = m24[a[31:8]];
    if (e[15]) return {1'b1, mlong[{e[14:0], a[7:0]}]};
    return {1'b0, e[14:0]};
  endfunction

  // scoreboard: expected results with the cycle they must appear in
  typedef struct { logic [31:0] addr; longint due; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    if (in_valid && in_ready) q.push_back('{in_addr, cycle + 3});
    if (in_valid && !in_ready) n_stall++;
    if (out_valid && rst_n) begin
      exp_t e;
      logic [15:0] x;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL result with nothing outstanding");
      end else begin
        e = q.pop_front();
        x = expect_nh(e.addr);
        if (out_addr != e.addr || out_nh != x[14:0] || out_long != x[15] || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL addr %h: got %h/%0d long %0d at %0d, want %h/%0d long %0d at %0d",
                     e.addr, out_addr, out_nh, out_long, cycle, e.addr, x[14:0], x[15], e.due);
        end
        if (out_long) n_long++; else n_short++;
      end
    end
  end

  initial begin
    logic [31:0] a;
    longint t0, t1;
    int got;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // example: 10.54/16 -> A, 10.54.34/24 -> B, 10.54.34.192/26 -> C
    for (int i = 0; i < 256; i++)
      if (i != 34) w24({8'd10, 8'd54, 8'(i)}, {1'b0, NH_A});
    w24({8'd10, 8'd54, 8'd34}, {1'b1, 15'd123});
    for (int i = 0; i < 256; i++) wlong({15'd123, 8'(i)}, (i < 192) ? NH_B : NH_C);
    for (int i = 0; i < 256; i++) idx_list.push_back({8'd10, 8'd54, 8'(i)});
    // random entries; pointer entries get a random block
    for (int i = 0; i < 300; i++) begin
      logic [23:0] ix;
      logic [14:0] blk;
      ix = 24'($urandom);
      if (ix[23:8] == {8'd10, 8'd54}) continue;
      if ($urandom_range(0, 3) == 0) begin
        blk = 15'($urandom_range(124, 32767));
        w24(ix, {1'b1, blk});
        for (int j = 0; j < 256; j++) wlong({blk, 8'(j)}, 15'($urandom));
      end else begin
        w24(ix, {1'b0, 15'($urandom)});
      end
      idx_list.push_back(ix);
    end
    $display("entries %0d, long blocks %0d", idx_list.size(), mlong.size()/256);
    // the worked example's specific addresses
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_addr = {8'd10, 8'd54, 8'd34, lows[i]};
    end
    @(negedge clk);
    in_valid = 1'b1;
    in_addr = {8'd10, 8'd54, 8'd200, 8'd7};
    // burst: one result per cycle
    @(negedge clk);
    t0 = cycle;
    for (int i = 0; i < 1000; i++) begin
      in_valid = 1'b1;
      in_addr = {idx_list[$urandom_range(0, idx_list.size()-1)], 8'($urandom)};
      @(negedge clk);
    end
    in_valid = 1'b0;
    t1 = cycle;
    checks++;
    if (t1 - t0 != 1000) begin
      failures++;
      $display("FAIL burst of 1000 took %0d cycles", t1 - t0);
    end
    // random valid and grant
    for (int i = 0; i < 3000; i++) begin
      in_valid = $urandom_range(0, 3) != 0;
      t24_gnt  = $urandom_range(0, 3) != 0;
      in_addr  = {idx_list[$urandom_range(0, idx_list.size()-1)], 8'($urandom)};
      @(negedge clk);
    end
    in_valid = 1'b0;
    t24_gnt = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_long == 0 || n_short == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL outstanding %0d long %0d short %0d stalls %0d", q.size(), n_long, n_short, n_stall);
    end
    $display("lookups: %0d via TBLlong, %0d via TBL24, %0d stalled cycles", n_long, n_short, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
