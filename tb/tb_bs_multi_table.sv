// Self-checking test of the three-table pipeline with its version controller.
//
// Two configurations of one flow (destination 192.168.0.2) alternate:
//   A: table 0 -> GotoTable 1, table 1 -> Output port 1, table 2 empty
//   B: table 0 -> GotoTable 2, table 1 -> Drop,          table 2 -> Output port 2
// Any mix of the two (say new table 0 with old table 2) gives a flood or a
// drop, so every result must be exactly the configuration of the version the
// packet was stamped with. Headers are sent back to back through each
// commit; one commit is left to the inactivity timer. Also checked: the
// increment is refused until every table has its EndTxn, the pipeline
// latency of 12 cycles, flooding of an unmatched packet, and the statistics
// counter of table 2.
module tb_bs_multi_table;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_commit_pkt = 0, n_commit_timer = 0, n_inc_rej = 0, n_flood = 0, n_old_new = 0;

  logic in_valid = 0, inc_req = 0;
  hdr_t in_hdr = '0;
  logic res_valid; res_t res;
  cfg_t cfg = '0;
  logic cfg_ack, cfg_rej, inc_ok, inc_rej, timer_fire, all_ready;
  logic [31:0] timeout = 50;
  logic [VER_W-1:0] vp;
  logic [NUM_TABLES-1:0] primed, commit, active_bank;
  logic [VER_W-1:0] vi [NUM_TABLES];
  logic [NT_W-1:0] stats_table = 2;
  logic [ENTRY_W-1:0] stats_addr = 0;
  logic [31:0] stats_data;

  bs_multi_table dut (.*);

  localparam logic [31:0] DST = 32'hC0A8_0002;
  int cyc = 0;
  always @(posedge clk) cyc++;
  res_t exp_q [$]; int exp_t [$];
  int hits_t2 = 0;

  function automatic res_t expect_for(logic [VER_W-1:0] v, logic [31:0] dst, logic [PORT_W-1:0] ip);
    res_t r; r.in_port = ip; r.drop = 0;
    if (v == 0 || dst != DST) begin r.out_mask = ~(NUM_PORTS'(1) << ip); end
    else if (v[0]) r.out_mask = 5'b00010;
    else begin r.out_mask = 5'b00100; end
    return r;
  endfunction

  task automatic cmd(int t, cfg_op_e op, act_t a);
    @(negedge clk);
    cfg = '0; cfg.valid = 1; cfg.op = op; cfg.table_id = NT_W'(t); cfg.addr = 0;
    cfg.value.ip_dst = DST; cfg.mask.ip_dst = '1; cfg.action = a;
    @(negedge clk); cfg = '0;
  endtask

  task automatic load(bit cfg_b);
    act_t g1, g2, o1, o2, dr;
    g1 = '0; g1.goto_valid = 1; g1.goto_table = 1;
    g2 = '0; g2.goto_valid = 1; g2.goto_table = 2;
    o1 = '0; o1.out_valid = 1; o1.out_mask = 5'b00010;
    o2 = '0; o2.out_valid = 1; o2.out_mask = 5'b00100;
    dr = '0; dr.drop = 1;
    cmd(0, CFG_WRITE, cfg_b ? g2 : g1);
    cmd(1, CFG_WRITE, cfg_b ? dr : o1);
    if (cfg_b) cmd(2, CFG_WRITE, o2); else cmd(2, CFG_CLEAR, '0);
    cmd(0, CFG_ENDTXN, '0);
    cmd(1, CFG_ENDTXN, '0);
    repeat (3) @(negedge clk);
    inc_req = 1; #1;                   // table 2 still Open: refused (S2)
    if (inc_rej) n_inc_rej++;
    checks++; if (!inc_rej) begin failures++; $display("FAIL increment not refused"); end
    @(negedge clk); inc_req = 0;
    cmd(2, CFG_ENDTXN, '0);
    repeat (3) @(negedge clk);
  endtask

  task automatic inc();
    inc_req = 1; #1;
    checks++; if (!inc_ok) begin failures++; $display("FAIL increment refused"); end
  endtask

  // traffic source: one header per cycle while `run`
  bit run = 0; bit do_inc = 0;
  always @(negedge clk) begin
    hdr_t h;
    in_valid = 0;
    if (run) begin
      inc_req = 0;
      h = '0;
      h.meta.in_port = PORT_W'($urandom_range(NUM_PORTS - 1));
      h.key.ip_dst = ($urandom_range(15) == 0) ? 32'hC0A8_0063 : DST;
      in_valid = 1; in_hdr = h;
      if (do_inc) begin inc(); do_inc = 0; end
      #1;
      exp_q.push_back(expect_for(dut.u_ver.out_hdr.meta.version, h.key.ip_dst, h.meta.in_port));
      exp_t.push_back(cyc);
      if (h.key.ip_dst == DST && dut.u_ver.out_hdr.meta.version != 0 && !dut.u_ver.out_hdr.meta.version[0]) hits_t2++;
    end
  end

  always @(negedge clk) if (rst_n && res_valid) begin
    res_t e; int t;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      e = exp_q.pop_front(); t = exp_t.pop_front();
      if (res !== e || cyc - t != 12) begin
        failures++; $display("FAIL result %h exp %h latency %0d", res, e, cyc - t);
      end
      if (res.out_mask == ~(NUM_PORTS'(1) << res.in_port)) n_flood++;
    end
  end

  always @(posedge clk) if (commit[0]) begin
    if (dut.u_ver.out_hdr.meta.flush || timer_fire) n_commit_timer++; else n_commit_pkt++;
  end

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      load(round[0]);
      if (round == 3) begin
        // no traffic: the inactivity timer must commit
        inc_req = 1; #1;
        checks++; if (!inc_ok) begin failures++; $display("FAIL increment refused"); end
        @(negedge clk); inc_req = 0;
        repeat (80) @(negedge clk);
        checks++;
        if (vi[2] != vp || |primed) begin failures++; $display("FAIL timer commit incomplete"); end
        run = 1; repeat (40) @(negedge clk); run = 0;
      end else begin
        run = 1;
        repeat (20) @(negedge clk);
        do_inc = 1;                      // increment in the middle of the stream
        repeat (40) @(negedge clk);
        run = 0;
      end
      repeat (20) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing results"); end
    #1;
    checks++;
    if (stats_data != 32'(hits_t2)) begin failures++; $display("FAIL stats %0d vs %0d", stats_data, hits_t2); end
    $display("packet commits=%0d timer commits=%0d refused increments=%0d floods=%0d", n_commit_pkt, n_commit_timer, n_inc_rej, n_flood);
    checks++;
    if (n_commit_pkt < 5 || n_commit_timer != 1 || n_inc_rej < 6 || n_flood == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
