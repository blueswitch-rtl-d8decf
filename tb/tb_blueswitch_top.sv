// End-to-end test of the switch at its default sizes.
//
// Reproduces a flow-modification reconfiguration on a three-table setup.
// Twelve UDP flows (150-byte frames to 192.168.0.2 .. .13) enter port 0.
//   Config A: table 0 sends .2-.7 to table 1 and .8-.13 to table 2;
//             table 1 outputs .2-.7 on port 1; table 2 outputs .8-.13 on port 2.
//   Config B: table 0 sends .2-.7 to table 2; table 1 drops .2-.7;
//             table 2 outputs .2-.13 on port 2.
// A packet that saw a mix of A and B would be dropped (old table 0, new
// table 1) or flooded (new table 0, old table 2). The driver loads A, lets the
// inactivity timer commit it with no traffic, starts traffic, loads B and
// commits it under traffic, then returns to A under traffic. Checked: each
// flow frame arrives exactly once and unmodified, on port 1 or 2 only, and per
// flow .2-.7 the ports follow A* B* A* in send order (no packet routed by the
// old policy after one routed by the new). Also: port 3 background traffic
// to port 2 (output contention), DMA-port frames that are dropped, flooded
// and multicast, output back-pressure, input stalls, a refused increment
// (a table not yet Primed), a refused command (table Primed), match
// statistics, commit counters, the cycle counter, and line rate: a burst of
// back-to-back frames on port 0 must be accepted at one beat per cycle
// (64 bits x 160 MHz covers 10 Gb/s).
module tb_blueswitch_top;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #3.125 clk = ~clk;   // 160 MHz
  int checks = 0, failures = 0;

  logic [AXIS_W-1:0] s_tdata [NUM_PORTS];
  logic [KEEP_W-1:0] s_tkeep [NUM_PORTS];
  logic [NUM_PORTS-1:0] s_tlast = '0, s_tvalid = '0, s_tready;
  logic [AXIS_W-1:0] m_tdata [NUM_PORTS];
  logic [KEEP_W-1:0] m_tkeep [NUM_PORTS];
  logic [NUM_PORTS-1:0] m_tlast, m_tvalid, m_tready = '1;
  logic [7:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 1, s_axil_arvalid = 0, s_axil_rready = 1;
  logic s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = 4'hF;
  logic [1:0] s_axil_bresp, s_axil_rresp;

  blueswitch_top dut (.*);

  // ---------------- mechanism counters ----------------
  int n_in_stall = 0, n_out_bp = 0, n_contend = 0, n_drop = 0, n_flood = 0, n_multi = 0;
  int n_commit_pkt = 0, n_commit_timer = 0, n_inc_rej = 0, n_cmd_rej = 0, n_rewind = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (s_tvalid[p] && !s_tready[p]) n_in_stall++;
      if (m_tvalid[p] && !m_tready[p]) n_out_bp++;
      if (dut.fifo_rewind[p]) n_rewind++;
    end
    if (dut.u_xbar.req[2][0] && dut.u_xbar.req[2][3]) n_contend++;
    if (dut.u_mtp.commit[0]) begin
      if (dut.u_mtp.stage_h[0].meta.flush) n_commit_timer++; else n_commit_pkt++;
    end
  end

  // ---------------- register access ----------------
  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wvalid = 1;
    #0.1; while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #0.1; end
    @(posedge clk); #0.1; s_axil_awvalid = 0; s_axil_wvalid = 0;
  endtask
  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    #0.1; while (!s_axil_arready) begin @(negedge clk); #0.1; end
    @(posedge clk); #0.1; s_axil_arvalid = 0;
    while (!s_axil_rvalid) begin @(posedge clk); #0.1; end
    d = s_axil_rdata;
  endtask

  localparam logic [31:0] NET = 32'hC0A8_0000;
  function automatic logic [31:0] act_out(logic [4:0] m); return {23'd0, 1'b1, 3'd0, m}; endfunction
  function automatic logic [31:0] act_goto(int t);        return 32'h0000_1000 | (32'(t) << 16); endfunction
  localparam logic [31:0] ACT_DROP = 32'h0000_0200;

  task automatic entry(int t, int e, logic [31:0] ip, logic [31:0] a, bit clear = 0);
    wr(8'h44, ip);           // key word 1 = destination IP
    wr(8'h14, 32'(t)); wr(8'h18, 32'(e)); wr(8'h1C, a);
    wr(8'h20, clear ? 32'd1 : 32'd0);
  endtask

  // Writes every entry of table t for configuration b (0 = A, 1 = B).
  task automatic load_table(int t, bit b);
    for (int e = 0; e < 16; e++) begin
      logic [31:0] ip; ip = NET + 32'(e + 2);
      case (t)
        0: if (e < 6)       entry(0, e, ip, act_goto(b ? 2 : 1));
           else if (e < 12) entry(0, e, ip, act_goto(2));
           else if (e == 12) entry(0, e, NET + 99, ACT_DROP);
           else if (e == 13) entry(0, e, NET + 50, act_out(5'b00110));
           else entry(0, e, 0, 0, 1);
        1: if (e < 6)       entry(1, e, ip, b ? ACT_DROP : act_out(5'b00010));
           else entry(1, e, 0, 0, 1);
        2: if (e < 6 && b)  entry(2, e, ip, act_out(5'b00100));
           else if (e >= 6 && e < 12) entry(2, e, ip, act_out(5'b00100));
           else entry(2, e, 0, 0, 1);
        default: ;
      endcase
    end
  endtask

  task automatic load_config(bit b);
    logic [31:0] d, r0, r1;
    for (int t = 0; t < NUM_TABLES; t++) load_table(t, b);
    wr(8'h14, 0); wr(8'h20, 2);          // EndTxn table 0
    wr(8'h14, 1); wr(8'h20, 2);          // EndTxn table 1
    // table 2 still Open: the increment must be refused
    rd(8'h2C, r0); wr(8'h00, 1); repeat (3) @(negedge clk); rd(8'h2C, r1);
    checks++; if (r1 != r0 + 1) begin failures++; $display("FAIL increment not refused %0d %0d", r0, r1); end
    else n_inc_rej++;
    // a command into a Primed table must be refused
    rd(8'h28, r0); entry(0, 15, 0, 0, 1); repeat (3) @(negedge clk); rd(8'h28, r1);
    checks++; if (r1 != r0 + 1) begin failures++; $display("FAIL command into Primed table accepted"); end
    else n_cmd_rej++;
    wr(8'h14, 2); wr(8'h20, 2);          // EndTxn table 2
    repeat (4) @(negedge clk);
    rd(8'h00, d);
    checks++; if (!d[8]) begin failures++; $display("FAIL not ready for increment"); end
    wr(8'h00, 1);                        // V_p + 1
  endtask

  // ---------------- traffic ----------------
  typedef byte unsigned frame_t [];
  function automatic frame_t mk_frame(logic [31:0] dst, int src_port, int seq, int len = 150);
    frame_t f; f = new[len];
    foreach (f[i]) f[i] = 8'(i * 7 + seq);
    for (int i = 0; i < 6; i++) begin f[i] = 8'h02; f[6+i] = 8'(src_port); end
    f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45; f[23] = 8'd17;
    {f[26], f[27], f[28], f[29]} = 32'h0A00_0001;
    {f[30], f[31], f[32], f[33]} = dst;
    {f[34], f[35], f[36], f[37]} = 32'h1234_0050;
    {f[42], f[43], f[44], f[45]} = seq;
    f[46] = 8'(src_port);
    return f;
  endfunction

  frame_t txq [NUM_PORTS][$];
  int     gap [NUM_PORTS];
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_tx
    initial begin
      s_tdata[p] = '0; s_tkeep[p] = '0;
      @(posedge rst_n);
      forever begin
        frame_t f;
        while (txq[p].size() == 0) @(negedge clk);
        f = txq[p].pop_front();
        for (int b = 0; b * 8 < f.size(); b++) begin
          @(negedge clk);
          s_tvalid[p] = 1; s_tlast[p] = ((b + 1) * 8 >= f.size());
          for (int l = 0; l < 8; l++) begin
            s_tdata[p][8*l +: 8] = (b*8 + l < f.size()) ? f[b*8 + l] : 8'h00;
            s_tkeep[p][l] = (b*8 + l < f.size());
          end
          #0.1; while (!s_tready[p]) begin @(negedge clk); #0.1; end
          @(posedge clk); #0.1;
          s_tvalid[p] = 0;
        end
        repeat (gap[p]) @(negedge clk);
      end
    end
  end

  // ---------------- receive side ----------------
  int rx_port [int];            // key: src_port*1e6 + seq -> output port
  int rx_cnt  [int];
  int sent_flow [12][$];        // seq numbers per flow, send order
  int n_bg_sent = 0, n_bg_rx = 0;
  frame_t sent_frames [int];
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_rx
    initial begin
      byte unsigned buf_q [$];
      forever begin
        @(posedge clk);
        if (rst_n && m_tvalid[p] && m_tready[p]) begin
          for (int l = 0; l < 8; l++) if (m_tkeep[p][l]) buf_q.push_back(m_tdata[p][8*l +: 8]);
          if (m_tlast[p]) begin
            int seq, src, key;
            seq = {buf_q[42], buf_q[43], buf_q[44], buf_q[45]}; src = buf_q[46];
            key = src * 1000000 + seq;
            rx_cnt[key] = rx_cnt.exists(key) ? rx_cnt[key] + 1 : 1;
            if (!rx_port.exists(key)) rx_port[key] = p;
            checks++;
            if (!sent_frames.exists(key) || buf_q.size() != sent_frames[key].size()) begin
              failures++; $display("FAIL unknown or resized frame at port %0d", p);
            end else begin
              for (int i = 0; i < buf_q.size(); i++) if (buf_q[i] != sent_frames[key][i]) begin
                failures++; $display("FAIL frame %0d corrupted", key); break;
              end
            end
            if (buf_q[33] == 8'd100) n_flood++;
            if (buf_q[33] == 8'd50)  n_multi++;
            if (src == 3) n_bg_rx++;
            buf_q = {};
          end
        end
      end
    end
  end

  always @(negedge clk) begin
    m_tready[1] = ($urandom_range(9) != 0);
    m_tready[2] = ($urandom_range(9) != 0);
  end

  int seq_ctr = 0;
  task automatic send_flows(int rounds);
    for (int r = 0; r < rounds; r++)
      for (int fl = 0; fl < 12; fl++) begin
        frame_t f; f = mk_frame(NET + 32'(fl + 2), 0, seq_ctr);
        sent_frames[seq_ctr] = f; sent_flow[fl].push_back(seq_ctr); seq_ctr++;
        txq[0].push_back(f);
      end
  endtask
  task automatic send_bg(int n);
    for (int i = 0; i < n; i++) begin
      frame_t f; f = mk_frame(NET + 32'(8 + i % 6), 3, seq_ctr);
      sent_frames[3000000 + seq_ctr] = f; seq_ctr++; n_bg_sent++;
      txq[3].push_back(f);
    end
  endtask
  task automatic send_dma(logic [7:0] host, int len);
    frame_t f; f = mk_frame(NET + 32'(host), 4, seq_ctr, len);
    sent_frames[4000000 + seq_ctr] = f; seq_ctr++;
    txq[4].push_back(f);
  endtask
  task automatic drain();
    int idle; idle = 0;
    while (idle < 400) begin
      @(negedge clk);
      if (txq[0].size() || txq[3].size() || txq[4].size() || |s_tvalid || |m_tvalid) idle = 0; else idle++;
    end
  endtask

  initial begin
    #40ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, c0, c1, h;
    for (int p = 0; p < NUM_PORTS; p++) gap[p] = 0;
    gap[0] = 6; gap[3] = 30; gap[4] = 20;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 7; w++) begin wr(8'(8'h40 + 4*w), 0); wr(8'(8'h60 + 4*w), w == 1 ? '1 : '0); end
    wr(8'h10, 200);                             // inactivity timer: 200 cycles
    // 1. config A, committed by the timer (no traffic)
    rd(8'h08, c0);
    load_config(0);
    repeat (300) @(negedge clk);
    rd(8'h08, c1);
    rd(8'h00, d);
    checks++; if (d[7:0] != 1 || dut.u_mtp.vi[2] != 1) begin failures++; $display("FAIL timer commit"); end
    $display("config A loaded and committed in %0d cycles", c1 - c0);
    // 2. line rate: 30 back-to-back frames on port 0, one beat per cycle
    begin
      int t0, stalls;
      gap[0] = 0; stalls = n_in_stall;
      m_tready[1] = 1; m_tready[2] = 1;
      for (int i = 0; i < 30; i++) begin
        frame_t f; f = mk_frame(NET + 32'(8 + i % 6), 0, seq_ctr);
        sent_frames[seq_ctr] = f; sent_flow[6 + i % 6].push_back(seq_ctr); seq_ctr++;
        txq[0].push_back(f);
      end
      t0 = 0;
      while (txq[0].size() || s_tvalid[0]) begin @(negedge clk); t0++; end
      checks++;
      if (n_in_stall != stalls || t0 > 30 * 19 + 10) begin
        failures++; $display("FAIL line rate: %0d cycles for %0d beats, %0d stalls", t0, 30 * 19, n_in_stall - stalls);
      end
      $display("line rate: %0d beats in %0d cycles", 30 * 19, t0);
      gap[0] = 6;
      drain();
    end
    // 3. traffic, then config B committed under traffic
    fork
      begin send_flows(30); send_bg(40); end
      begin
        repeat (500) @(negedge clk);
        send_dma(99, 64);   // dropped
        send_dma(100, 80);  // flooded
        send_dma(50, 72);   // multicast to ports 1 and 2
        load_config(1);
      end
    join
    send_flows(20);
    drain();
    // 4. back to A under traffic
    fork
      send_flows(30);
      begin repeat (300) @(negedge clk); load_config(0); end
    join
    send_flows(10);
    drain();

    // ---------------- checks ----------------
    rd(8'h34, d);
    checks++; if (d != 3) begin failures++; $display("FAIL commits reported %0d", d); end
    for (int fl = 0; fl < 12; fl++) begin
      int runs, last;
      runs = 0; last = -1;
      foreach (sent_flow[fl][k]) begin
        int s, p; s = sent_flow[fl][k];
        checks++;
        if (!rx_cnt.exists(s) || rx_cnt[s] != 1) begin failures++; $display("FAIL flow %0d frame %0d received %0d times", fl, s, rx_cnt.exists(s) ? rx_cnt[s] : 0); continue; end
        p = rx_port[s];
        if (fl >= 6 && p != 2) begin failures++; $display("FAIL flow %0d on port %0d", fl, p); end
        if (fl < 6 && p != 1 && p != 2) begin failures++; $display("FAIL flow %0d on port %0d", fl, p); end
        if (p != last) begin runs++; last = p; end
      end
      if (fl < 6) begin
        checks++;
        if (runs != 3) begin failures++; $display("FAIL flow %0d: %0d port runs (expected A, B, A)", fl, runs); end
      end
    end
    // DMA frames: drop -> nowhere, flood -> ports 0..3, multicast -> 1 and 2
    checks++; if (n_flood != 4) begin failures++; $display("FAIL flood copies %0d", n_flood); end
    checks++; if (n_multi != 2) begin failures++; $display("FAIL multicast copies %0d", n_multi); end
    foreach (sent_frames[k]) if (k >= 4000000 && sent_frames[k][33] == 99) begin
      n_drop++;
      checks++; if (rx_cnt.exists(k)) begin failures++; $display("FAIL dropped frame delivered"); end
    end
    checks++; if (n_bg_rx != n_bg_sent) begin failures++; $display("FAIL background %0d of %0d", n_bg_rx, n_bg_sent); end
    // statistics: table 2 entry 6 (.8) hits
    wr(8'h38, 32'h0000_0206); rd(8'h3C, d);
    begin
      int exp_hits; exp_hits = sent_flow[6].size() + (n_bg_sent + 5) / 6;
      checks++; if (d != 32'(exp_hits)) begin failures++; $display("FAIL stats %0d vs %0d", d, exp_hits); end
    end
    rd(8'h08, d); rd(8'h0C, h);
    checks++; if (h != 0 || d == 0) begin failures++; $display("FAIL cycle counter"); end

    $display("commits: packet=%0d timer=%0d  refused: increments=%0d commands=%0d", n_commit_pkt, n_commit_timer, n_inc_rej, n_cmd_rej);
    $display("input stalls=%0d output back-pressure=%0d contention=%0d copies(rewinds)=%0d drop=%0d flood=%0d multicast=%0d",
             n_in_stall, n_out_bp, n_contend, n_rewind, n_drop, n_flood, n_multi);
    checks++;
    if (n_commit_pkt != 2 || n_commit_timer != 1 || n_inc_rej != 3 || n_cmd_rej != 3 || n_in_stall == 0 ||
        n_out_bp == 0 || n_contend == 0 || n_rewind == 0 || n_drop != 1) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
