// Self-checking test of the output crossbar: every input sends random frames
// to random outputs, with random valid gaps and random output back-pressure.
// Each output must receive whole frames, never interleaved, and each input's
// frames for that output in order; contention for an output is counted.
module tb_bs_xbar;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_contend = 0;

  logic [NUM_PORTS-1:0] s_tvalid = '0, s_tready, m_tvalid, m_tready = '0;
  beat_t s_beat [NUM_PORTS];
  logic [PORT_W-1:0] s_tdest [NUM_PORTS];
  beat_t m_beat [NUM_PORTS];
  bs_xbar dut (.*);

  // beat data: {input, output, frame number, beat number}
  int fno [NUM_PORTS][NUM_PORTS];      // next frame expected from input i at output o
  int cur_in [NUM_PORTS];              // input currently owning output o, -1 none
  int cur_b  [NUM_PORTS];
  int sent [NUM_PORTS][NUM_PORTS];

  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_src
    initial begin
      s_beat[i] = '0; s_tdest[i] = '0;
      @(posedge rst_n);
      for (int f = 0; f < 60; f++) begin
        int len, o;
        len = $urandom_range(1, 8); o = $urandom_range(NUM_PORTS - 1);
        for (int b = 0; b < len; b++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin s_tvalid[i] = 0; @(negedge clk); end
          s_tvalid[i] = 1; s_tdest[i] = PORT_W'(o);
          s_beat[i].data = {8'(i), 8'(o), 16'(sent[i][o]), 32'(b)};
          s_beat[i].keep = '1; s_beat[i].last = (b == len - 1);
          @(posedge clk); while (!s_tready[i]) @(posedge clk);
          #1;
        end
        sent[i][o]++;
        s_tvalid[i] = 0;
      end
    end
  end

  always @(negedge clk) for (int o = 0; o < NUM_PORTS; o++) m_tready[o] = ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n) begin
    int nreq [NUM_PORTS];
    for (int o = 0; o < NUM_PORTS; o++) nreq[o] = 0;
    for (int i = 0; i < NUM_PORTS; i++) if (s_tvalid[i]) nreq[s_tdest[i]]++;
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (nreq[o] > 1) n_contend++;
      if (m_tvalid[o] && m_tready[o]) begin
        int i, ob, fn, bn;
        i = int'(m_beat[o].data[63:56]); ob = int'(m_beat[o].data[55:48]);
        fn = int'(m_beat[o].data[47:32]); bn = int'(m_beat[o].data[31:0]);
        checks++;
        if (ob != o) begin failures++; $display("FAIL wrong output"); end
        if (cur_in[o] < 0) begin
          if (bn != 0 || fn != fno[i][o]) begin failures++; $display("FAIL frame start out %0d in %0d f %0d/%0d b %0d", o, i, fn, fno[i][o], bn); end
          cur_in[o] = i; cur_b[o] = 0;
        end else if (i != cur_in[o] || bn != cur_b[o] + 1) begin
          failures++; $display("FAIL interleave at output %0d", o);
        end else cur_b[o] = bn;
        if (m_beat[o].last) begin cur_in[o] = -1; fno[i][o]++; end
      end
    end
  end

  initial begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      cur_in[o] = -1; cur_b[o] = 0;
      for (int i = 0; i < NUM_PORTS; i++) begin fno[i][o] = 0; sent[i][o] = 0; end
    end
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (8000) @(negedge clk);
    for (int i = 0; i < NUM_PORTS; i++) for (int o = 0; o < NUM_PORTS; o++) begin
      checks++;
      if (fno[i][o] != sent[i][o]) begin failures++; $display("FAIL in %0d out %0d: %0d of %0d frames", i, o, fno[i][o], sent[i][o]); end
    end
    $display("contended cycles=%0d", n_contend);
    checks++;
    if (n_contend == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
