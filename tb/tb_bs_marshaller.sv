// Self-checking test of the packet marshaller together with a packet FIFO.
// Random frames are written into the FIFO; for each a random result
// (unicast, multicast, flood-like mask, drop, empty mask) is offered. The
// output, with random back-pressure, must be one exact copy of the frame per
// port in the mask, lowest port first, and nothing for dropped frames; the
// beat on the output must hold while not accepted.
module tb_bs_marshaller;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_multi = 0, n_drop = 0, n_stall = 0;

  logic wr_valid = 0, wr_ready; beat_t wr_beat = '0;
  logic rd_valid, rd_pop, rewind, release_o;
  beat_t rd_beat;
  logic act_valid = 0, act_pop; res_t act = '0;
  logic m_tvalid, m_tready = 0; beat_t m_beat; logic [PORT_W-1:0] m_tdest;

  bs_pkt_fifo #(.DEPTH(128)) u_fifo (.clk, .rst_n, .wr_valid, .wr_ready, .wr_beat,
    .rd_valid, .rd_beat, .rd_pop, .rewind, .release_i(release_o));
  bs_marshaller dut (.*);

  typedef struct { beat_t b; logic [PORT_W-1:0] d; } obeat_t;
  obeat_t exp_q [$];
  res_t   res_q [$];

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // result source: offer the next result only once its frame is complete
  int frames_done = 0, results_used = 0;
  always @(negedge clk) begin
    if (act_valid && act_pop_q) begin void'(res_q.pop_front()); results_used++; end
    act_valid = (res_q.size() > 0) && (results_used < frames_done);
    if (act_valid) act = res_q[0];
  end
  logic act_pop_q = 0;
  always @(posedge clk) act_pop_q <= act_pop;

  // sink
  always @(negedge clk) begin
    if (rst_n && m_tvalid && m_tready_q) n_stall += 0;
    m_tready = ($urandom_range(3) != 0);
  end
  logic m_tready_q; assign m_tready_q = m_tready;
  obeat_t held; logic held_v = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && !m_tready) begin held_v <= 1; held <= '{m_beat, m_tdest}; n_stall++; end
    else held_v <= 0;
    if (held_v) begin
      checks++;
      if (!m_tvalid || m_beat !== held.b || m_tdest !== held.d) begin failures++; $display("FAIL beat not held"); end
    end
    if (m_tvalid && m_tready) begin
      obeat_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected beat"); end
      else begin
        e = exp_q.pop_front();
        if (m_beat !== e.b || m_tdest !== e.d) begin failures++; $display("FAIL beat %h/%0d exp %h/%0d", m_beat.data, m_tdest, e.b.data, e.d); end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 150; f++) begin
      beat_t fr [$]; res_t r; int len;
      fr = {};
      len = $urandom_range(1, 12);
      for (int b = 0; b < len; b++) begin
        beat_t x; x.data = {$urandom, $urandom}; x.keep = '1; x.last = (b == len - 1); fr.push_back(x);
      end
      r.in_port = 0; r.drop = ($urandom_range(7) == 0);
      r.out_mask = NUM_PORTS'($urandom);
      if (r.drop) begin r.out_mask = '0; n_drop++; end
      else if ($countones(r.out_mask) > 1) n_multi++;
      for (int p = 0; p < NUM_PORTS; p++)
        if (r.out_mask[p]) foreach (fr[b]) exp_q.push_back('{fr[b], PORT_W'(p)});
      res_q.push_back(r);
      foreach (fr[b]) begin
        @(negedge clk); wr_valid = 1; wr_beat = fr[b];
        while (!wr_ready) @(negedge clk);
        @(posedge clk); #1; wr_valid = 0;
      end
      frames_done++;
    end
    repeat (3000) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || rd_valid) begin failures++; $display("FAIL %0d beats missing", exp_q.size()); end
    $display("multicast=%0d dropped=%0d stalls=%0d", n_multi, n_drop, n_stall);
    checks++;
    if (n_multi == 0 || n_drop == 0 || n_stall == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
