// tb_ip_lookup_chip: end-to-end test of the lookup chip at its full size
// (2^24-entry TBL24, 2^15 TBLlong blocks, 2^13-row route store).
//
// Sequence:
//   1. CLEAR (one pass over all 2^24 TBL24 entries).
//   2. Routes in order of increasing length: 10/8, the worked example of the
//      DIR-24-8 scheme (10.54/16, 10.54.34/24, 10.54.34.192/26), 128.23/16 and
//      random routes of 9 to 32 bits. Lookups of random addresses run in the
//      background on every cycle, so the update engine's TBL24 reads stall them.
//   3. Directed lookups of the worked example, a burst of 1000 back-to-back
//      lookups (must take 1000 cycles), then random lookups checked against a
//      longest-prefix-match model kept per prefix length.
//   4. Read-back of stored routes through the 9C decompressor, with the code
//      length compared with an independent 9C model.
//   5. /32 routes in fresh /24 groups until the TBLlong blocks run out (err_full)
//      and the route store is full (store_full), then lookups again.
// Every result must appear 3 cycles after its address was accepted. Each
// mechanism (short and long lookups, no-route results, stalls, block allocation,
// block reuse, dropped route, full store) is counted and must occur.
module tb_ip_lookup_chip;
  import iplk_pkg::*;
  import ninec_ref_pkg::*;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  lk_valid = 1'b0, lk_ready, res_valid, res_long;
  logic [31:0]           lk_addr = '0, res_addr;
  logic [14:0]           res_index;
  logic                  cmd_valid = 1'b0, cmd_ready, upd_busy, upd_done, upd_err_full, lk_stall;
  cmd_op_t               cmd_op = CMD_CLEAR;
  logic [31:0]           cmd_prefix = '0;
  logic [5:0]            cmd_len = '0;
  logic [14:0]           cmd_nh = '0;
  logic [15:0]           blocks_used;
  logic [13:0]           routes_stored;
  logic                  store_full, rb_en = 1'b0, rb_valid;
  logic [12:0]           rb_row = '0;
  logic [31:0]           rb_prefix;
  logic [5:0]            rb_len, rb_code_len;
  logic [14:0]           rb_nh;

  ip_lookup_chip dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  bit check_values = 0;
  // mechanism counters
  int n_short = 0, n_long = 0, n_noroute = 0, n_stall = 0;
  int n_alloc = 0, n_reuse = 0, n_dropped = 0, n_store_full = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------- reference
  logic [14:0] rmap [bit [37:0]];   // {len, masked prefix} -> next hop
  bit          has_blk [bit [23:0]];
  typedef struct { logic [31:0] p; int len; logic [14:0] nh; } route_t;
  route_t stored [$];               // routes in the order the store logs them

  function automatic logic [31:0] mask(int len);
    return (len == 0) ? '0 : ~(32'hFFFF_FFFF >> len);
  endfunction

  function automatic logic [14:0] ref_lpm(logic [31:0] a);
    for (int len = 32; len >= 0; len--) begin
      bit [37:0] key = {6'(len), a & mask(len)};
      if (rmap.exists(key)) return rmap[key];
    end
    return '0;
  endfunction

  // ------------------------------------------------------------- scoreboard
  typedef struct { logic [31:0] addr; longint due; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    cycle++;
    if (lk_stall) n_stall++;
    if (lk_valid && lk_ready) q.push_back('{lk_addr, cycle + 3});
    if (res_valid && rst_n) begin
      exp_t e;
      logic [14:0] nh;
      bit lng;
      e = q.pop_front();
      nh = ref_lpm(e.addr);
      lng = has_blk.exists(e.addr[31:8]);
      checks++;
      if (res_addr != e.addr || cycle != e.due ||
          (check_values && (res_index != nh || res_long != lng))) begin
        failures++;
        if (failures < 12)
          $display("FAIL lookup %h: got %0d long %0d at %0d, want %0d long %0d at %0d",
                   e.addr, res_index, res_long, cycle, nh, lng, e.due);
      end
      if (check_values) begin
        if (res_long) n_long++; else n_short++;
        if (nh == 0) n_noroute++;
      end
    end
  end

  // ------------------------------------------------------------- commands
  task automatic cmd(cmd_op_t op, logic [31:0] p, int len, logic [14:0] nh);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_prefix = p; cmd_len = 6'(len); cmd_nh = nh;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!upd_done) @(negedge clk);
  endtask

  task automatic insert(logic [31:0] p, int len, logic [14:0] nh);
    bit keep = 1;
    int blk_before = int'(blocks_used);
    p &= mask(len);
    if (len > 24) begin
      if (has_blk.exists(p[31:8])) n_reuse++;
      else if (has_blk.num() < 2**PTR_W) begin has_blk[p[31:8]] = 1; n_alloc++; end
      else keep = 0;
    end
    if (stored.size() < 2**ROW_ADDR_W) stored.push_back('{p, len, nh});
    else n_store_full++;
    cmd(CMD_INSERT, p, len, nh);
    if (keep) rmap[{6'(len), p}] = nh;
    else begin
      n_dropped++;
      check(upd_err_full == 1'b1 && int'(blocks_used) == blk_before, "dropped route flags err_full");
    end
    if (keep && len > 24) check(int'(blocks_used) == has_blk.num(), "blocks_used");
  endtask

  task automatic lookup_burst(int n, bit random_addr, logic [31:0] base);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      lk_valid = 1'b1;
      lk_addr  = random_addr ? 32'($urandom) : base;
    end
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_one(logic [31:0] a, logic [14:0] nh, bit lng, string what);
    @(negedge clk);
    lk_valid = 1'b1; lk_addr = a;
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (2) @(negedge clk);
    check(res_valid && res_addr == a && res_index == nh && res_long == lng,
          $sformatf("%s: %h gave %0d long %0d", what, a, res_index, res_long));
  endtask

  localparam logic [14:0] NH_E = 15'd5, NH_A = 15'd101, NH_B = 15'd202, NH_C = 15'd303,
                          NH_D = 15'd404;

  initial begin
    route_t todo [$];
    bit updates_done = 0;
    longint t0;
    int code_bits = 0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cmd(CMD_CLEAR, '0, 0, '0);
    check(blocks_used == 0 && routes_stored == 0 && !upd_err_full, "state after clear");

    // routes, increasing length, with background lookups
    todo.push_back('{32'h0A00_0000, 8,  NH_E});
    todo.push_back('{32'h0A36_0000, 16, NH_A});   // 10.54/16
    todo.push_back('{32'h8017_0000, 16, NH_D});   // 128.23/16
    todo.push_back('{32'h0A36_2200, 24, NH_B});   // 10.54.34/24
    todo.push_back('{32'h0A36_22C0, 26, NH_C});   // 10.54.34.192/26
    for (int i = 0; i < 400; i++) begin
      route_t r;
      r.len = $urandom_range(9, 32);
      // half the routes fall into 10/8 and 10.54/16 to overlap the example
      r.p = 32'($urandom);
      if (i % 4 == 0) r.p[31:16] = 16'h0A36;
      else if (i % 4 == 1) r.p[31:24] = 8'h0A;
      r.nh = 15'($urandom_range(1, 32767));
      todo.push_back(r);
    end
    fork
      begin
        for (int len = 0; len <= 32; len++)
          foreach (todo[i]) if (todo[i].len == len) insert(todo[i].p, len, todo[i].nh);
        updates_done = 1;
      end
      while (!updates_done) begin
        @(negedge clk);
        lk_valid = 1'b1;
        lk_addr  = 32'($urandom);
      end
    join
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (5) @(negedge clk);
    check_values = 1;

    // the worked example (unless a random route is more specific there)
    expect_one(32'h0A36_0001, ref_lpm(32'h0A36_0001), has_blk.exists(24'h0A3600), "10.54.0.1");
    expect_one(32'h0A36_2205, ref_lpm(32'h0A36_2205), 1'b1, "10.54.34.5");
    expect_one(32'h0A36_22BF, ref_lpm(32'h0A36_22BF), 1'b1, "10.54.34.191");
    expect_one(32'h0A36_22C0, ref_lpm(32'h0A36_22C0), 1'b1, "10.54.34.192");
    expect_one(32'h0A36_22FF, ref_lpm(32'h0A36_22FF), 1'b1, "10.54.34.255");
    expect_one(32'h0B00_0000, 15'd0, 1'b0, "11.0.0.0 (no route)");
    check(rmap[{6'd26, 32'h0A36_22C0}] == NH_C && rmap[{6'd16, 32'h8017_0000}] == NH_D,
          "example routes are in the model");

    // rate: 1000 back-to-back lookups, one result per cycle
    @(negedge clk);
    t0 = cycle;
    for (int i = 0; i < 1000; i++) begin
      lk_valid = 1'b1;
      lk_addr = (i % 2) ? 32'($urandom) : {16'h0A36, 16'($urandom)};
      @(negedge clk);
    end
    lk_valid = 1'b0;
    check(cycle - t0 == 1000, $sformatf("1000 lookups accepted in %0d cycles", cycle - t0));
    repeat (4) @(negedge clk);
    lookup_burst(20000, 1, '0);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      lk_valid = 1'b1;
      lk_addr = {8'h0A, 24'($urandom)};
    end
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (4) @(negedge clk);

    // read back the stored routes
    for (int i = 0; i < stored.size(); i++) begin
      bit [47:0] rc;
      int rl;
      compress(stored[i].p, mask(stored[i].len), rc, rl);
      @(negedge clk);
      rb_en = 1'b1; rb_row = 13'(i);
      @(negedge clk);
      rb_en = 1'b0;
      check(rb_valid && rb_prefix == stored[i].p && int'(rb_len) == stored[i].len &&
            rb_nh == stored[i].nh && int'(rb_code_len) == rl,
            $sformatf("row %0d: %h/%0d nh %0d code %0d, want %h/%0d nh %0d code %0d", i,
                      rb_prefix, rb_len, rb_nh, rb_code_len, stored[i].p, stored[i].len,
                      stored[i].nh, rl));
      code_bits += rl;
    end
    $display("%0d stored routes: %0d prefix bits compress to %0d code bits",
             stored.size(), 32 * stored.size(), code_bits);

    // fill TBLlong and the route store with /32 routes in fresh /24 groups
    check_values = 0;
    begin
      int i = 0;
      while (n_dropped < 2) begin
        logic [31:0] p;
        p = {8'd20, 16'(i), 8'd1};
        insert(p, 32, 15'(i % 32767 + 1));
        i++;
      end
    end
    check(upd_err_full && int'(blocks_used) == 2**PTR_W, "TBLlong exhausted");
    check(store_full && int'(routes_stored) == 2**ROW_ADDR_W, "route store full");
    check_values = 1;
    lookup_burst(20000, 1, '0);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      lk_valid = 1'b1;
      lk_addr = {8'd20, 16'($urandom_range(0, 33000)), 8'($urandom_range(0, 2))};
    end
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (5) @(negedge clk);

    check(q.size() == 0, "no lookup left outstanding");
    $display("short %0d long %0d no-route %0d stalls %0d alloc %0d reuse %0d dropped %0d store-full %0d",
             n_short, n_long, n_noroute, n_stall, n_alloc, n_reuse, n_dropped, n_store_full);
    check(n_short > 0, "short lookups seen");
    check(n_long > 0, "long lookups seen");
    check(n_noroute > 0, "no-route results seen");
    check(n_stall > 0, "stalls seen");
    check(n_alloc > 0, "block allocations seen");
    check(n_reuse > 0, "block reuse seen");
    check(n_dropped > 0, "dropped routes seen");
    check(n_store_full > 0, "full store seen");
    $display("cycles %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
