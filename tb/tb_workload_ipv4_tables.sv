// tb_workload_ipv4_tables: loads IPv4 routing tables of 20000, 31284, 48210,
// 144124 and 223112 prefixes into the full-size lookup chip and checks lookups.
//
// The table sizes are those the route lookup literature commonly evaluates; the
// prefixes themselves are synthetic. Their length mix is modelled on backbone
// tables of that era: about 0.3% of length 8-15, 40% of 16-23, 58% of exactly 24
// and 1.7% longer than 24. For each size the chip is cleared, the routes are
// inserted in order of increasing length, and 20000 lookups of addresses inside
// random routes plus 5000 of random addresses are compared with a longest-prefix
// match model. Per size the testbench reports the TBLlong blocks used, the
// number of insert cycles and the 9C code size of the routes kept in the route
// store.
module tb_workload_ipv4_tables;
  import iplk_pkg::*;
  import ninec_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        lk_valid = 1'b0, lk_ready, res_valid, res_long;
  logic [31:0] lk_addr = '0, res_addr;
  logic [14:0] res_index;
  logic        cmd_valid = 1'b0, cmd_ready, upd_busy, upd_done, upd_err_full, lk_stall;
  cmd_op_t     cmd_op = CMD_CLEAR;
  logic [31:0] cmd_prefix = '0;
  logic [5:0]  cmd_len = '0;
  logic [14:0] cmd_nh = '0;
  logic [15:0] blocks_used;
  logic [13:0] routes_stored;
  logic        store_full, rb_en = 1'b0, rb_valid;
  logic [12:0] rb_row = '0;
  logic [31:0] rb_prefix;
  logic [5:0]  rb_len, rb_code_len;
  logic [14:0] rb_nh;

  ip_lookup_chip dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [14:0] rmap [bit [37:0]];
  typedef struct { logic [31:0] p; int len; logic [14:0] nh; } route_t;

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

  typedef struct { logic [31:0] addr; longint due; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    cycle++;
    if (lk_valid && lk_ready) q.push_back('{lk_addr, cycle + 3});
    if (res_valid && rst_n) begin
      exp_t e;
      logic [14:0] nh;
      e = q.pop_front();
      nh = ref_lpm(e.addr);
      checks++;
      if (res_addr != e.addr || cycle != e.due || res_index != nh) begin
        failures++;
        if (failures < 12)
          $display("FAIL lookup %h: got %0d at %0d, want %0d at %0d", e.addr, res_index,
                   cycle, nh, e.due);
      end
    end
  end

  task automatic cmd(cmd_op_t op, logic [31:0] p, int len, logic [14:0] nh);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_prefix = p; cmd_len = 6'(len); cmd_nh = nh;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!upd_done) @(negedge clk);
  endtask

  task automatic run_table(int n);
    route_t by_len [33][$];
    route_t all [$];
    longint t0;
    int code_bits = 0, kept = 0;
    rmap.delete();
    for (int i = 0; i < n; i++) begin
      route_t r;
      int pick;
      pick = $urandom_range(0, 999);
      if (pick < 3)        r.len = $urandom_range(8, 15);
      else if (pick < 403) r.len = $urandom_range(16, 23);
      else if (pick < 983) r.len = 24;
      else                 r.len = $urandom_range(25, 32);
      r.p  = 32'($urandom) & mask(r.len);
      r.nh = 15'($urandom_range(1, 32767));
      by_len[r.len].push_back(r);
    end
    cmd(CMD_CLEAR, '0, 0, '0);
    t0 = cycle;
    for (int len = 0; len <= 32; len++)
      foreach (by_len[len][i]) begin
        route_t r = by_len[len][i];
        cmd(CMD_INSERT, r.p, r.len, r.nh);
        rmap[{6'(r.len), r.p}] = r.nh;
        all.push_back(r);
        if (kept < 2**ROW_ADDR_W) begin
          bit [47:0] rc;
          int rl;
          compress(r.p, mask(r.len), rc, rl);
          code_bits += rl;
          kept++;
        end
      end
    checks++;
    if (upd_err_full) begin
      failures++;
      $display("FAIL table of %0d prefixes ran out of TBLlong blocks", n);
    end
    $display("table %0d: %0d insert cycles, %0d TBLlong blocks, store %0d routes in %0d code bits (%0d plain)",
             n, cycle - t0, blocks_used, routes_stored, code_bits, 32 * kept);
    checks++;
    if (int'(routes_stored) != ((n < 2**ROW_ADDR_W) ? n : 2**ROW_ADDR_W)) begin
      failures++;
      $display("FAIL routes_stored %0d", routes_stored);
    end
    for (int i = 0; i < 25000; i++) begin
      @(negedge clk);
      lk_valid = 1'b1;
      if (i < 20000) begin
        route_t r = all[$urandom_range(0, all.size() - 1)];
        lk_addr = r.p | (32'($urandom) & ~mask(r.len));
      end else begin
        lk_addr = 32'($urandom);
      end
    end
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int sizes [5] = '{20000, 31284, 48210, 144124, 223112};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (sizes[s]) run_table(sizes[s]);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d lookups outstanding", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
