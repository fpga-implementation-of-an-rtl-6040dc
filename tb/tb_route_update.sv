// tb_route_update: checks the route update engine on a scaled-down address
// space (16-bit addresses, 8-bit first-level index, 8-bit low part, 16-bit
// block numbers limited to 6 blocks) so that every address can be checked.
//
// The testbench models both tables from the engine's write ports (TBL24 with a
// one-cycle registered read). After a CLEAR it inserts random routes in order of
// increasing length, then resolves every one of the 65536 addresses through the
// modelled tables and compares the result with a brute-force longest-prefix
// match over the routes (later routes win ties; long routes that found no free
// block are left out). Also checked: the scaled worked example (a /8, a /16
// inside it and a /10 of that /8 using a block), the number of cycles a short
// insert takes (one write per expanded entry), block allocation and reuse, the
// sticky err_full flag and its clearing by CLEAR.
module tb_route_update;
  import iplk_pkg::*;
  localparam int AW = 16, IW = 8, PW = 4, NW = 15, LW = 5, NBLK = 6;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          cmd_valid = 1'b0, cmd_ready;
  cmd_op_t       cmd_op = CMD_CLEAR;
  logic [AW-1:0] cmd_prefix = '0;
  logic [LW-1:0] cmd_len = '0;
  logic [NW-1:0] cmd_nh = '0;
  logic          t24_rd_en, t24_wr_en, tl_wr_en, busy, done, err_full;
  logic [IW-1:0] t24_rd_addr, t24_wr_addr;
  logic [NW:0]   t24_rd_data, t24_wr_data;
  logic [PW+AW-IW-1:0] tl_wr_addr;
  logic [NW-1:0] tl_wr_data;
  logic [PW:0]   blocks_used;

  logic [NW:0]   m24 [2**IW];
  logic [NW-1:0] mlong [2**(PW+AW-IW)];
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_t24w = 0, n_tlw = 0;

  route_update #(.ADDR_W(AW), .IDX_W(IW), .PTR_W(PW), .NH_W(NW), .LEN_W(LW),
                 .LONG_BLOCKS(NBLK)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (t24_rd_en) t24_rd_data <= m24[t24_rd_addr];
    if (t24_wr_en) begin m24[t24_wr_addr] <= t24_wr_data; n_t24w++; end
    if (tl_wr_en)  begin mlong[tl_wr_addr] <= tl_wr_data; n_tlw++; end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [AW-1:0] p; int len; logic [NW-1:0] nh; } route_t;
  route_t routes [$];        // routes in the tables
  bit     has_blk [int];     // first-level groups that own a block

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // Issue one command and wait for done; returns the cycles from accept to done.
  task automatic cmd(cmd_op_t op, logic [AW-1:0] p, int len, logic [NW-1:0] nh,
                     output longint took);
    longint t0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_prefix = p; cmd_len = LW'(len); cmd_nh = nh;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(negedge clk);
    took = cycle - t0;
  endtask

  function automatic logic [AW-1:0] mask(int len);
    return (len == 0) ? '0 : ~({AW{1'b1}} >> len);
  endfunction

  task automatic insert(logic [AW-1:0] p, int len, logic [NW-1:0] nh);
    longint took;
    int grp = int'(p[AW-1 -: IW]);
    bit keep = 1;
    bit new_blk = 0;
    int w24 = n_t24w, wl = n_tlw;
    p &= mask(len);
    if (len > IW && !has_blk.exists(grp)) begin
      if (has_blk.num() < NBLK) begin has_blk[grp] = 1; new_blk = 1; end
      else keep = 0;
    end
    cmd(CMD_INSERT, p, len, nh, took);
    if (keep) routes.push_back('{p, len, nh});
    if (len <= IW) begin
      check(took == longint'(2**(IW-len)) + 1 && n_t24w - w24 == 2**(IW-len),
            $sformatf("short /%0d took %0d cycles, %0d writes", len, took, n_t24w - w24));
    end else if (!keep) begin
      check(err_full == 1'b1 && n_tlw == wl, "dropped long route sets err_full");
    end else if (new_blk) begin
      check(n_tlw - wl == 2**(AW-IW) && n_t24w - w24 == 1,
            $sformatf("new block: %0d long writes, %0d TBL24 writes", n_tlw - wl, n_t24w - w24));
    end else begin
      check(n_tlw - wl == 2**(AW-len) && n_t24w == w24,
            $sformatf("reused block: %0d long writes", n_tlw - wl));
    end
  endtask

  function automatic logic [NW-1:0] ref_lpm(logic [AW-1:0] a);
    int best = -1;
    logic [NW-1:0] nh = '0;
    foreach (routes[i])
      if (((a ^ routes[i].p) & mask(routes[i].len)) == 0 && routes[i].len >= best) begin
        best = routes[i].len;
        nh = routes[i].nh;
      end
    return nh;
  endfunction

  function automatic logic [NW-1:0] table_lookup(logic [AW-1:0] a);
    logic [NW:0] e = m24[a[AW-1 -: IW]];
    if (e[NW]) return mlong[{e[PW-1:0], a[AW-IW-1:0]}];
    return e[NW-1:0];
  endfunction

  task automatic check_all(string what);
    int bad = 0;
    for (int a = 0; a < 2**AW; a++)
      if (table_lookup(AW'(a)) != ref_lpm(AW'(a))) begin
        bad++;
        if (bad < 4) $display("  %s: addr %h table %0d ref %0d", what, a[15:0],
                              table_lookup(AW'(a)), ref_lpm(AW'(a)));
      end
    check(bad == 0, $sformatf("%s: %0d addresses differ", what, bad));
  endtask

  task automatic clear();
    longint took;
    cmd(CMD_CLEAR, '0, 0, '0, took);
    routes.delete();
    has_blk.delete();
    check(took == longint'(2**IW) + 1, $sformatf("clear took %0d cycles", took));
    check(blocks_used == 0 && err_full == 0, "clear frees blocks and err_full");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // scaled worked example: a /4, a /8 inside it, a /10 beyond the first
    // level (needs a block) and a /16 in the same group (reuses the block)
    clear();
    insert(16'h0000, 4, 15'd7);
    insert(16'h0A00, 8, 15'd101);
    insert(16'h0AC0, 10, 15'd303);   // needs a block, filled with 101 elsewhere
    insert(16'h0A22, 16, 15'd404);   // reuses that block
    check(blocks_used == 1, "one block after the example");
    check(table_lookup(16'h0A05) == 101 && table_lookup(16'h0AC1) == 303 &&
          table_lookup(16'h0A22) == 404 && table_lookup(16'h0B00) == 7 &&
          table_lookup(16'h1000) == 0, "example lookups");
    check_all("example");
    // random routes, increasing length, until the blocks run out
    for (int round = 0; round < 3; round++) begin
      route_t todo [$];
      clear();
      for (int i = 0; i < 40; i++) begin
        route_t r;
        r.len = $urandom_range(0, AW);
        r.p   = AW'($urandom);
        r.nh  = NW'($urandom_range(1, 2**NW - 1));
        todo.push_back(r);
      end
      for (int len = 0; len <= AW; len++)
        foreach (todo[i]) if (todo[i].len == len) insert(todo[i].p, len, todo[i].nh);
      check(int'(blocks_used) == has_blk.num(), "blocks_used count");
      check_all($sformatf("random round %0d", round));
    end
    check(err_full == 1'b1, "blocks ran out at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
