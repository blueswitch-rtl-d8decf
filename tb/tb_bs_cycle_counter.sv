// Self-checking test of the cycle counter: zero after reset, +1 per cycle,
// and the difference of two samples equals the cycles between them.
module tb_bs_cycle_counter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [63:0] count, a;
  bs_cycle_counter #(.W(64)) dut (.*);
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    checks++; if (count != 0) failures++;
    rst_n = 1;
    @(negedge clk);
    checks++; if (count != 1) begin failures++; $display("FAIL first count %0d", count); end
    for (int n = 0; n < 20; n++) begin
      int d;
      a = count; d = $urandom_range(1, 50);
      repeat (d) @(negedge clk);
      checks++;
      if (count - a != 64'(d)) begin failures++; $display("FAIL delta %0d vs %0d", count - a, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
