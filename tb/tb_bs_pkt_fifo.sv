// Self-checking test of the packet FIFO with re-read: writes random frames
// while reading with random stalls, reads some frames twice (rewind), and
// checks the data order, that space is only freed by release, and full.
module tb_bs_pkt_fifo;
  import bs_pkg::*;
  localparam int unsigned D = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_rewind = 0, n_full = 0;

  logic wr_valid = 0, wr_ready, rd_valid, rd_pop = 0, rewind = 0, release_i = 0;
  beat_t wr_beat = '0, rd_beat;
  bs_pkt_fifo #(.DEPTH(D)) dut (.*);

  beat_t frames [$][$];
  initial begin
    #3000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    @(posedge rst_n);
    for (int f = 0; f < 200; f++) begin
      int len; beat_t fr [$];
      fr = {};
      len = $urandom_range(1, 20);
      for (int b = 0; b < len; b++) begin
        beat_t x; x.data = {$urandom, $urandom}; x.keep = '1; x.last = (b == len - 1);
        fr.push_back(x);
      end
      frames.push_back(fr);
      foreach (fr[b]) begin
        @(negedge clk); wr_valid = 1; wr_beat = fr[b];
        while (!wr_ready) begin n_full++; @(negedge clk); end
        @(posedge clk); #1; wr_valid = 0;
      end
    end
  end

  // reader
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 200; f++) begin
      int copies;
      while (frames.size() == 0) @(negedge clk);
      if (f < 20) repeat (200) @(negedge clk);    // let the FIFO fill up
      copies = ($urandom_range(3) == 0) ? 2 : 1;
      for (int c = 0; c < copies; c++) begin
        for (int b = 0; b < frames[0].size(); b++) begin
          @(negedge clk);
          while (!rd_valid || $urandom_range(3) == 0) begin rd_pop = 0; rewind = 0; release_i = 0; @(negedge clk); end
          checks++;
          if (rd_beat !== frames[0][b]) begin failures++; $display("FAIL frame %0d beat %0d", f, b); end
          rd_pop = 1;
          rewind = (b == frames[0].size() - 1) && (c < copies - 1);
          release_i = (b == frames[0].size() - 1) && (c == copies - 1);
          if (rewind) n_rewind++;
        end
        @(negedge clk); rd_pop = 0; rewind = 0; release_i = 0;
      end
      void'(frames.pop_front());
    end
    repeat (5) @(negedge clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL data left"); end
    $display("rewinds=%0d full stalls=%0d", n_rewind, n_full);
    checks++;
    if (n_rewind == 0 || n_full == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
