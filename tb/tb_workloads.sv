// Evaluation workloads run on the whole switch at its default sizes.
//
//  1. Flow insertion: twelve flows (192.168.0.2 .. .13) from port 0 are
//     load-balanced over ports 1 (.2-.5), 2 (.6-.9) and 3 (.10-.13). Under
//     traffic, one transaction removes the eight rules for ports 2 and 3 and
//     inserts eight new rules at other entries that send those flows to
//     port 1. Every frame must arrive once, on its old port or on port 1,
//     and per flow never on the old port after the new one.
//  2. Reconfiguration time against policy size: 2, 4, 8 and 16 rules have
//     their output changed in one transaction under traffic; the cycle
//     counter gives the time from the first register write to the commit,
//     and every changed rule must be in effect afterwards.
//  3. Forwarding latency against frame size (64 .. 1500 bytes) through an
//     idle switch: the first output beat must follow the first input beat
//     after the frame's beats plus a fixed delay of 16 cycles
//     (store and forward), and the frame must leave at one beat per cycle.
module tb_workloads;
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

  int cyc = 0;
  always @(posedge clk) cyc++;

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
  function automatic logic [31:0] act_out(int p); return {23'd0, 1'b1, 3'd0, 5'(1 << p)}; endfunction
  task automatic entry(int e, logic [31:0] ip, logic [31:0] a, bit clear = 0);
    wr(8'h44, ip); wr(8'h18, 32'(e)); wr(8'h1C, a);
    wr(8'h20, clear ? 32'd1 : 32'd0);
  endtask
  // Table 0 holds the policy; tables 1 and 2 take only their EndTxn.
  task automatic commit_all();
    logic [31:0] d;
    wr(8'h14, 0); wr(8'h20, 2);
    wr(8'h14, 1); wr(8'h20, 2);
    wr(8'h14, 2); wr(8'h20, 2);
    wr(8'h14, 0);
    d = 0;
    while (!d[8]) rd(8'h00, d);
    wr(8'h00, 1);
  endtask
  task automatic wait_commits(int n);
    logic [31:0] d; d = 0;
    while (d != 32'(n)) rd(8'h34, d);
  endtask

  typedef byte unsigned frame_t [];
  function automatic frame_t mk_frame(logic [31:0] dst, int seq, int len = 150);
    frame_t f; f = new[len];
    foreach (f[i]) f[i] = 8'(i * 5 + seq);
    for (int i = 0; i < 12; i++) f[i] = 8'h02;
    f[12] = 8'h08; f[13] = 8'h00; f[14] = 8'h45; f[23] = 8'd17;
    {f[30], f[31], f[32], f[33]} = dst;
    {f[42], f[43], f[44], f[45]} = seq;
    return f;
  endfunction

  frame_t txq [$];
  int gap = 4;
  int first_in [int];
  initial begin
    s_tdata[0] = '0; s_tkeep[0] = '0;
    for (int p = 1; p < NUM_PORTS; p++) begin s_tdata[p] = '0; s_tkeep[p] = '0; end
    @(posedge rst_n);
    forever begin
      frame_t f; int seq;
      while (txq.size() == 0) @(negedge clk);
      f = txq.pop_front();
      seq = {f[42], f[43], f[44], f[45]};
      for (int b = 0; b * 8 < f.size(); b++) begin
        @(negedge clk);
        s_tvalid[0] = 1; s_tlast[0] = ((b + 1) * 8 >= f.size());
        for (int l = 0; l < 8; l++) begin
          s_tdata[0][8*l +: 8] = (b*8 + l < f.size()) ? f[b*8 + l] : 8'h00;
          s_tkeep[0][l] = (b*8 + l < f.size());
        end
        #0.1; while (!s_tready[0]) begin @(negedge clk); #0.1; end
        @(posedge clk); #0.1;
        if (b == 0) first_in[seq] = cyc;
        s_tvalid[0] = 0;
      end
      repeat (gap) @(negedge clk);
    end
  end

  int rx_port [int], rx_cnt [int], rx_first [int], rx_last [int], rx_len [int];
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_rx
    initial begin
      byte unsigned buf_q [$]; int t0;
      forever begin
        @(posedge clk);
        if (rst_n && m_tvalid[p] && m_tready[p]) begin
          if (buf_q.size() == 0) t0 = cyc;
          for (int l = 0; l < 8; l++) if (m_tkeep[p][l]) buf_q.push_back(m_tdata[p][8*l +: 8]);
          if (m_tlast[p]) begin
            int seq; seq = {buf_q[42], buf_q[43], buf_q[44], buf_q[45]};
            rx_cnt[seq] = rx_cnt.exists(seq) ? rx_cnt[seq] + 1 : 1;
            rx_port[seq] = p; rx_first[seq] = t0; rx_last[seq] = cyc; rx_len[seq] = buf_q.size();
            buf_q = {};
          end
        end
      end
    end
  end

  int seq_ctr = 0;
  int flow_seq [12][$];
  task automatic send_round();
    for (int fl = 0; fl < 12; fl++) begin
      flow_seq[fl].push_back(seq_ctr);
      txq.push_back(mk_frame(NET + 32'(fl + 2), seq_ctr)); seq_ctr++;
    end
  endtask
  task automatic drain();
    int idle; idle = 0;
    while (idle < 300) begin
      @(negedge clk);
      if (txq.size() || |s_tvalid || |m_tvalid) idle = 0; else idle++;
    end
  endtask

  initial begin
    #40ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] t0, t1;
    int ncommit; ncommit = 0;
    repeat (4) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 7; w++) begin wr(8'(8'h40 + 4*w), 0); wr(8'(8'h60 + 4*w), w == 1 ? '1 : '0); end
    wr(8'h10, 100);

    // ---------- 1. flow insertion ----------
    for (int fl = 0; fl < 12; fl++) entry(fl, NET + 32'(fl + 2), act_out(1 + fl / 4));
    commit_all(); ncommit++; wait_commits(ncommit);
    fork
      for (int r = 0; r < 40; r++) send_round();
      begin
        repeat (600) @(negedge clk);
        for (int fl = 0; fl < 4; fl++)  entry(fl, NET + 32'(fl + 2), act_out(1));
        for (int fl = 4; fl < 12; fl++) entry(fl, 0, 0, 1);                 // remove 8 rules
        for (int fl = 4; fl < 12; fl++) entry(16 + fl, NET + 32'(fl + 2), act_out(1)); // insert 8
        commit_all(); ncommit++;
      end
    join
    drain();
    begin
      int moved; moved = 0;
      for (int fl = 0; fl < 12; fl++) begin
        int runs, last, oldp;
        runs = 0; last = -1; oldp = 1 + fl / 4;
        foreach (flow_seq[fl][k]) begin
          int s; s = flow_seq[fl][k];
          checks++;
          if (!rx_cnt.exists(s) || rx_cnt[s] != 1 || (rx_port[s] != oldp && rx_port[s] != 1)) begin
            failures++; $display("FAIL insertion flow %0d frame %0d", fl, s); continue;
          end
          if (rx_port[s] != last) begin runs++; last = rx_port[s]; end
        end
        checks++;
        if (runs > (fl < 4 ? 1 : 2)) begin failures++; $display("FAIL flow %0d switched back", fl); end
        if (fl >= 4 && runs == 2) moved++;
      end
      checks++;
      if (moved != 8) begin failures++; $display("FAIL only %0d flows moved", moved); end
      $display("flow insertion: %0d frames, %0d flows moved to port 1, none misrouted", seq_ctr, moved);
    end

    // ---------- 2. reconfiguration time vs policy size ----------
    // Policy: flows .2-.17 (16 rules); each round moves n of them to the other port.
    for (int e = 0; e < 32; e++) entry(e, NET + 32'(e + 2), (e < 16) ? act_out(2) : 32'd0, e >= 16);
    commit_all(); ncommit++; wait_commits(ncommit);
    begin
      int sizes [4] = '{2, 4, 8, 16};
      int prev; prev = 0;
      foreach (sizes[k]) begin
        int n, port;
        n = sizes[k]; port = k[0] ? 2 : 1;
        fork
          for (int r = 0; r < 6; r++) send_round();
          begin
            rd(8'h08, t0);
            for (int e = 0; e < n; e++) entry(e, NET + 32'(e + 2), act_out(port));
            commit_all(); ncommit++; wait_commits(ncommit);
            rd(8'h08, t1);
          end
        join
        drain();
        $display("policy size %0d rules: reconfiguration %0d cycles (%0d ns at 160 MHz)", n, t1 - t0, (t1 - t0) * 25 / 4);
        checks++;
        if (int'(t1 - t0) <= prev) begin failures++; $display("FAIL time does not grow with size"); end
        prev = int'(t1 - t0);
        // probe every changed rule after the commit
        for (int e = 0; e < n && e < 12; e++) begin
          int s; s = seq_ctr;
          txq.push_back(mk_frame(NET + 32'(e + 2), seq_ctr)); seq_ctr++;
          drain();
          checks++;
          if (!rx_cnt.exists(s) || rx_port[s] != port) begin failures++; $display("FAIL rule %0d not updated", e); end
        end
      end
    end

    // ---------- 3. forwarding latency vs frame size ----------
    begin
      int sizes [6] = '{64, 128, 256, 512, 1024, 1500};
      foreach (sizes[k]) begin
        int s, beats; s = seq_ctr; beats = (sizes[k] + 7) / 8;
        txq.push_back(mk_frame(NET + 32'(2 + 12), seq_ctr, sizes[k])); seq_ctr++;
        drain();
        checks++;
        if (!rx_cnt.exists(s) || rx_len[s] != sizes[k] ||
            rx_first[s] - first_in[s] != beats + 16 || rx_last[s] - rx_first[s] != beats - 1) begin
          failures++;
          $display("FAIL size %0d: latency %0d, %0d output cycles", sizes[k],
                   rx_cnt.exists(s) ? rx_first[s] - first_in[s] : -1, rx_cnt.exists(s) ? rx_last[s] - rx_first[s] + 1 : -1);
        end else
          $display("frame %0d B (%0d beats): first-in to first-out %0d cycles (%0d ns)", sizes[k], beats,
                   rx_first[s] - first_in[s], (rx_first[s] - first_in[s]) * 25 / 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
