// tb_lookup_alu: checks the lookup unit (lookup pipeline plus update engine) on
// scaled-down tables: 16-bit addresses, 8-bit first-level index, 8 blocks.
//
// Routes are inserted (increasing length) while lookups are offered on every
// cycle, so that the engine's TBL24 reads stall the lookup input; every accepted
// lookup must produce a result exactly 3 cycles later. Once the table is built,
// random and exhaustive lookups are compared with a brute-force longest-prefix
// match over the inserted routes, checking both the next hop and whether the
// second table was used. The run must see stalls and lookups through both tables.
module tb_lookup_alu;
  import iplk_pkg::*;
  localparam int AW = 16, IW = 8, PW = 4, NW = 15, LW = 5, NBLK = 8;
  localparam int TW = PW + AW - IW;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          lk_valid = 1'b0, lk_ready, res_valid, res_long;
  logic [AW-1:0] lk_addr = '0, res_addr;
  logic [NW-1:0] res_nh;
  logic          cmd_valid = 1'b0, cmd_ready, upd_busy, upd_done, upd_err_full, lk_stall;
  cmd_op_t       cmd_op = CMD_CLEAR;
  logic [AW-1:0] cmd_prefix = '0;
  logic [LW-1:0] cmd_len = '0;
  logic [NW-1:0] cmd_nh = '0;
  logic [PW:0]   blocks_used;
  logic          t24_rd_en, t24_wr_en, tl_rd_en, tl_wr_en;
  logic [IW-1:0] t24_rd_addr, t24_wr_addr;
  logic [NW:0]   t24_rd_data, t24_wr_data;
  logic [TW-1:0] tl_rd_addr, tl_wr_addr;
  logic [NW-1:0] tl_rd_data, tl_wr_data;

  lookup_alu #(.ADDR_W(AW), .IDX_W(IW), .PTR_W(PW), .NH_W(NW), .LEN_W(LW),
               .LONG_BLOCKS(NBLK)) dut (.*);
  tbl24 #(.IDX_W(IW), .DATA_W(NW+1)) u_t24 (
    .clk, .rd_en(t24_rd_en), .rd_addr(t24_rd_addr), .rd_data(t24_rd_data),
    .wr_en(t24_wr_en), .wr_addr(t24_wr_addr), .wr_data(t24_wr_data));
  tbllong #(.ADDR_W(TW), .DATA_W(NW)) u_tl (
    .clk, .rd_en(tl_rd_en), .rd_addr(tl_rd_addr), .rd_data(tl_rd_data),
    .wr_en(tl_wr_en), .wr_addr(tl_wr_addr), .wr_data(tl_wr_data));

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_stall = 0, n_long = 0, n_short = 0;
  bit check_values = 0;
  bit updates_done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [AW-1:0] p; int len; logic [NW-1:0] nh; } route_t;
  route_t routes [$];
  bit has_blk [int];

  function automatic logic [AW-1:0] mask(int len);
    return (len == 0) ? '0 : ~({AW{1'b1}} >> len);
  endfunction

  // reference: next hop and whether it comes from a route longer than IW
  function automatic void ref_lpm(logic [AW-1:0] a, output logic [NW-1:0] nh,
                                  output bit lng);
    int best = -1;
    nh = '0;
    foreach (routes[i])
      if (((a ^ routes[i].p) & mask(routes[i].len)) == 0 && routes[i].len >= best) begin
        best = routes[i].len;
        nh = routes[i].nh;
      end
    lng = has_blk.exists(int'(a[AW-1 -: IW]));
  endfunction

  typedef struct { logic [AW-1:0] addr; longint due; } exp_t;
  exp_t q [$];

  always @(posedge clk) begin
    cycle++;
    if (lk_stall) n_stall++;
    if (lk_valid && lk_ready) q.push_back('{lk_addr, cycle + 3});
    if (res_valid && rst_n) begin
      exp_t e;
      logic [NW-1:0] nh;
      bit lng;
      checks++;
      e = q.pop_front();
      ref_lpm(e.addr, nh, lng);
      if (res_addr != e.addr || cycle != e.due ||
          (check_values && (res_nh != nh || res_long != lng))) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h: got %0d long %0d at %0d, want %0d long %0d at %0d",
                   e.addr, res_nh, res_long, cycle, nh, lng, e.due);
      end
      if (res_long) n_long++; else n_short++;
    end
  end

  task automatic cmd(cmd_op_t op, logic [AW-1:0] p, int len, logic [NW-1:0] nh);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; cmd_op = op; cmd_prefix = p; cmd_len = LW'(len); cmd_nh = nh;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!upd_done) @(negedge clk);
  endtask

  initial begin
    route_t todo [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // lookups run on every cycle in the background during the updates
    fork
      begin
        cmd(CMD_CLEAR, '0, 0, '0);
        for (int i = 0; i < 60; i++) begin
          route_t r;
          r.len = $urandom_range(0, AW);
          r.p   = AW'($urandom) & mask(r.len);
          r.nh  = NW'($urandom_range(1, 2**NW - 1));
          todo.push_back(r);
        end
        for (int len = 0; len <= AW; len++)
          foreach (todo[i])
            if (todo[i].len == len) begin
              int grp;
              bit keep;
              grp = int'(todo[i].p[AW-1 -: IW]);
              keep = 1;
              if (len > IW && !has_blk.exists(grp)) begin
                if (has_blk.num() < NBLK) has_blk[grp] = 1;
                else keep = 0;
              end
              cmd(CMD_INSERT, todo[i].p, len, todo[i].nh);
              if (keep) routes.push_back(todo[i]);
            end
        updates_done = 1;
      end
      begin
        while (!updates_done) begin
          @(negedge clk);
          lk_valid = 1'b1;
          lk_addr  = AW'($urandom);
        end
      end
    join
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (5) @(negedge clk);
    // table built: check values
    check_values = 1;
    for (int a = 0; a < 2**AW; a++) begin
      lk_valid = 1'b1;
      lk_addr  = AW'(a);
      @(negedge clk);
    end
    lk_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_stall == 0 || n_long == 0 || n_short == 0) begin
      failures++;
      $display("FAIL outstanding %0d stalls %0d long %0d short %0d", q.size(), n_stall,
               n_long, n_short);
    end
    $display("stalls %0d, long %0d, short %0d, blocks %0d, err_full %0d", n_stall, n_long,
             n_short, blocks_used, upd_err_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
