// Self-checking test of one double-buffered flow table (table 0).
//
// A reference model of the table (two banks, Open/Primed state, V_i) is
// updated at the moment each command or header enters the table, and
// predicts the header that must leave exactly 4 cycles later. Random
// traffic (one header per cycle at most), random configuration commands and
// version increments, issued only when the table is Primed as the driver
// rules require, run for several thousand cycles. Checked: every output
// header and its latency, acceptance and refusal of every command (no
// command enters a Primed table), commits only on the first header with a
// new version, headers skipped when dropped or addressed to a later table,
// commit tokens, and match statistics.
module tb_bs_flow_table;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_commit = 0, n_rej = 0, n_hit = 0, n_skip = 0, n_flush = 0;

  logic in_valid = 0;
  hdr_t in_hdr = '0;
  logic out_valid;
  hdr_t out_hdr;
  cfg_t cfg = '0;
  logic cfg_ack, cfg_rej, primed, commit, active_bank;
  logic [VER_W-1:0] vi;
  logic [ENTRY_W-1:0] stats_addr = '0;
  logic [31:0] stats_data;

  bs_flow_table #(.TABLE_ID(0)) dut (.*);

  // reference model
  key_t m_val [2][ENTRIES];
  key_t m_msk [2][ENTRIES];
  logic m_vld [2][ENTRIES];
  act_t m_act [2][ENTRIES];
  int   m_stats [ENTRIES];
  logic m_active = 0, m_primed = 0;
  logic [VER_W-1:0] m_vi = 0, vp = 0;
  hdr_t exp_q [$];
  int   exp_t [$];
  int   cyc = 0;

  always @(posedge clk) cyc++;

  function automatic hdr_t model_pkt(hdr_t h);
    hdr_t o; int hit_e;
    o = h;
    if (h.meta.version != m_vi) begin
      if (m_primed) begin m_active = ~m_active; m_primed = 0; n_commit++; end
      m_vi = h.meta.version;
    end
    if (h.meta.flush || h.meta.drop || h.meta.next_table != 0) begin n_skip++; return o; end
    hit_e = -1;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (m_vld[m_active][e] && ((h.key & m_msk[m_active][e]) == (m_val[m_active][e] & m_msk[m_active][e])))
        hit_e = e;
    if (hit_e < 0) o.meta.next_table = 1;
    else begin
      act_t a; a = m_act[m_active][hit_e];
      n_hit++;
      m_stats[hit_e]++;
      if (a.out_valid) begin o.meta.out_valid = 1; o.meta.out_mask = a.out_mask; end
      if (a.drop) o.meta.drop = 1;
      o.meta.next_table = a.goto_valid ? a.goto_table : NT_W'(NUM_TABLES);
    end
    return o;
  endfunction

  function automatic key_t rkey();
    key_t k;
    k = '0;
    k.ip_dst = 32'hC0A8_0000 | 32'($urandom_range(15));
    k.l4_dst = 16'($urandom_range(3));
    return k;
  endfunction

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // output monitor
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      hdr_t e; int t;
      e = exp_q.pop_front(); t = exp_t.pop_front();
      if (out_hdr !== e || cyc - t != 4) begin
        failures++;
        $display("FAIL out at %0d (sent %0d): got %h exp %h", cyc, t, out_hdr.meta, e.meta);
      end
    end
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int e = 0; e < ENTRIES; e++) begin
      m_val[b][e] = '0; m_msk[b][e] = '0; m_vld[b][e] = 0; m_act[b][e] = '0;
    end
    for (int e = 0; e < ENTRIES; e++) m_stats[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      in_valid = 0; cfg = '0;
      // version increment (driver rule D2: only when Primed and caught up)
      if (primed && m_vi == vp && $urandom_range(3) == 0) vp++;
      // configuration command
      if ($urandom_range(2) == 0) begin
        int u;
        cfg.valid = 1;
        cfg.table_id = ($urandom_range(9) == 0) ? NT_W'(1) : NT_W'(0);
        u = $urandom_range(19);
        cfg.op = (u == 0) ? CFG_ENDTXN : (u == 1) ? CFG_CLEAR : CFG_WRITE;
        if (!m_primed && $urandom_range(30) == 0) cfg.op = CFG_ENDTXN;
        cfg.addr = ENTRY_W'($urandom_range(15));
        cfg.value = rkey();
        cfg.mask = '0;
        cfg.mask.ip_dst = '1;
        if ($urandom_range(3) == 0) cfg.mask.l4_dst = '1;
        if ($urandom_range(7) == 0) cfg.mask = '0;
        cfg.action.out_valid = $urandom_range(1);
        cfg.action.out_mask = NUM_PORTS'($urandom);
        cfg.action.drop = ($urandom_range(7) == 0);
        cfg.action.goto_valid = $urandom_range(1);
        cfg.action.goto_table = NT_W'($urandom_range(1, NUM_TABLES));
        #1;
        checks++;
        if (cfg.table_id == 0) begin
          if (cfg_ack !== !m_primed || cfg_rej !== m_primed) begin
            failures++; $display("FAIL cfg ack=%0d rej=%0d model primed=%0d", cfg_ack, cfg_rej, m_primed);
          end
          if (m_primed) n_rej++;
          else if (cfg.op == CFG_ENDTXN) m_primed = 1;
          else begin
            logic sh; sh = ~m_active;
            m_vld[sh][cfg.addr] = (cfg.op == CFG_WRITE);
            m_val[sh][cfg.addr] = cfg.value;
            m_msk[sh][cfg.addr] = cfg.mask;
            m_act[sh][cfg.addr] = (cfg.op == CFG_WRITE) ? cfg.action : '0;
          end
        end else if (cfg_ack || cfg_rej) begin
          failures++; $display("FAIL answered a command for another table");
        end
      end
      // header
      if ($urandom_range(3) != 0) begin
        hdr_t h;
        h = '0;
        h.key = rkey();
        h.meta.in_port = PORT_W'($urandom_range(NUM_PORTS - 1));
        h.meta.version = vp;
        if ($urandom_range(9) == 0) h.meta.next_table = NT_W'($urandom_range(1, NUM_TABLES));
        if ($urandom_range(19) == 0) h.meta.drop = 1;
        if ($urandom_range(29) == 0) begin h.meta.flush = 1; h.key = '0; n_flush++; end
        in_valid = 1; in_hdr = h;
        exp_q.push_back(model_pkt(h));
        exp_t.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0; cfg = '0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    checks++;
    if (vi !== m_vi || active_bank !== m_active) begin failures++; $display("FAIL final vi/bank"); end
    for (int e = 0; e < 16; e++) begin
      stats_addr = ENTRY_W'(e); #1;
      checks++;
      if (stats_data != 32'(m_stats[e])) begin failures++; $display("FAIL stats %0d: %0d vs %0d", e, stats_data, m_stats[e]); end
    end
    $display("commits=%0d refused=%0d hits=%0d skipped=%0d tokens=%0d", n_commit, n_rej, n_hit, n_skip, n_flush);
    checks++;
    if (n_commit < 5 || n_rej < 5 || n_hit < 50 || n_flush < 5) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
