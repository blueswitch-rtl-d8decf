// Self-checking test of the action RAM: reset contents, random writes and
// reads against a reference array, one-cycle read latency, and read-enable
// holding the output.
module tb_bs_action_ram;
  localparam int unsigned E = 32, W = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we = 0, re = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [E];

  bs_action_ram #(.ENTRIES(E), .W(W)) dut (.*);

  task automatic rd(int a);
    @(negedge clk); re = 1; raddr = 5'(a);
    @(negedge clk); re = 0;
    checks++;
    if (rdata !== ref_mem[a]) begin failures++; $display("FAIL read %0d: %h vs %h", a, rdata, ref_mem[a]); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) ref_mem[e] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int e = 0; e < E; e += 5) rd(e);
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom_range(E-1)); wdata = W'($urandom);
      ref_mem[waddr] = wdata;
      @(negedge clk); we = 0;
      rd($urandom_range(E-1));
      rd(waddr);
    end
    // re low keeps the last read value
    rd(7);
    @(negedge clk); we = 1; waddr = 7; wdata = ~ref_mem[7]; @(negedge clk); we = 0;
    checks++;
    if (rdata !== ref_mem[7]) begin failures++; $display("FAIL hold"); end
    ref_mem[7] = wdata;
    rd(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
