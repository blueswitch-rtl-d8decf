// Self-checking test of the header arbiter: random per-port header streams
// with random credit returns. Checked: at most one grant per cycle, grants
// only to requesting ports with credit, each header forwarded unchanged one
// cycle after its grant and in per-port order, round-robin fairness (a port
// that keeps requesting is served within NUM_PORTS grants), and credit
// exhaustion blocking a port.
module tb_bs_in_arbiter;
  import bs_pkg::*;
  localparam int unsigned CR = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_block = 0, n_contend = 0;
  logic [NUM_PORTS-1:0] req = '0, pop, ret = '0;
  hdr_t hdr_in [NUM_PORTS];
  logic out_valid; hdr_t out_hdr;
  bs_in_arbiter #(.CREDITS(CR)) dut (.*);

  int seq [NUM_PORTS], used [NUM_PORTS], wait_n [NUM_PORTS];
  hdr_t exp_h; logic exp_v = 0;

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin seq[p] = 0; used[p] = 0; wait_n[p] = 0; hdr_in[p] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check last cycle's grant arrived
      checks++;
      if (out_valid !== exp_v || (exp_v && out_hdr !== exp_h)) begin failures++; $display("FAIL output at %0d", n); end
      for (int p = 0; p < NUM_PORTS; p++) begin
        hdr_in[p] = '0; hdr_in[p].meta.in_port = PORT_W'(p); hdr_in[p].key.ip_dst = 32'(seq[p]);
        req[p] = (n < 2500) ? ($urandom_range(3) != 0) : 1'b0;
        ret[p] = (used[p] > 0) && ($urandom_range(2) == 0);
      end
      #1;
      checks++;
      if ($countones(pop) > 1) begin failures++; $display("FAIL two grants"); end
      if ($countones(req) > 1) n_contend++;
      exp_v = 0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (pop[p]) begin
          if (!req[p] || used[p] >= CR) begin failures++; $display("FAIL bad grant %0d", p); end
          exp_v = 1; exp_h = hdr_in[p]; seq[p]++; used[p]++; wait_n[p] = 0;
        end else if (req[p] && used[p] < CR && $countones(pop) == 1) begin
          wait_n[p]++;
          if (wait_n[p] >= NUM_PORTS) begin failures++; $display("FAIL port %0d starved", p); end
        end
        if (req[p] && used[p] >= CR) n_block++;
        if (ret[p]) used[p]--;
        if (!req[p]) wait_n[p] = 0;
      end
    end
    $display("contended cycles=%0d credit blocks=%0d", n_contend, n_block);
    checks++;
    if (n_contend == 0 || n_block == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
