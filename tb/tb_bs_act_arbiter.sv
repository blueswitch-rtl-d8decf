// Self-checking test of the result arbiter: random results are routed by
// input port into per-port FIFOs and drained at random; each port must see
// exactly its own results, in order.
module tb_bs_act_arbiter;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0; res_t in_res = '0;
  logic [NUM_PORTS-1:0] act_valid, act_pop = '0;
  res_t act [NUM_PORTS];
  bs_act_arbiter #(.DEPTH(8)) dut (.*);
  res_t q [NUM_PORTS][$];

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 0; act_pop = '0;
      #1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        checks++;
        if (act_valid[p] !== (q[p].size() != 0) || (act_valid[p] && act[p] !== q[p][0])) begin
          failures++; $display("FAIL port %0d", p);
        end
        if (act_valid[p] && $urandom_range(2) == 0) begin act_pop[p] = 1; void'(q[p].pop_front()); end
      end
      if (n < 2900) begin
        res_t r;
        r.in_port = PORT_W'($urandom_range(NUM_PORTS - 1)); r.drop = $urandom_range(1); r.out_mask = NUM_PORTS'($urandom);
        if (q[r.in_port].size() < 8 - int'(act_pop[r.in_port] == 0)) begin
          in_valid = 1; in_res = r; q[r.in_port].push_back(r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
