// Self-checking test of the ternary CAM.
//
// Fills the 32 entries with random value/mask pairs (some entries invalid),
// then searches with keys derived from entries and with random keys, and
// compares hit and index, two cycles after each search, with a reference
// search (lowest valid matching entry). Also checks that an entry deleted
// or rewritten takes effect on the next search.
module tb_bs_tcam;
  localparam int unsigned E = 32, KW = 224;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, wr_valid = 0, search_en = 0;
  logic [4:0] wr_addr = '0;
  logic [KW-1:0] wr_value = '0, wr_mask = '0, search_key = '0;
  logic hit; logic [4:0] idx;

  bs_tcam #(.ENTRIES(E), .KEY_W(KW)) dut (.*);

  logic [KW-1:0] mv [E], mm [E];
  logic          mval [E];

  function automatic logic [KW-1:0] rnd();
    logic [KW-1:0] r;
    for (int i = 0; i < KW; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic write(int a, logic [KW-1:0] v, logic [KW-1:0] m, logic valid);
    @(negedge clk);
    wr_en = 1; wr_addr = 5'(a); wr_value = v; wr_mask = m; wr_valid = valid;
    mv[a] = v & m; mm[a] = m; mval[a] = valid;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic search(logic [KW-1:0] k);
    logic exp_hit; int exp_idx;
    exp_hit = 0; exp_idx = 0;
    for (int e = E - 1; e >= 0; e--)
      if (mval[e] && ((k & mm[e]) == mv[e])) begin exp_hit = 1; exp_idx = e; end
    @(negedge clk);
    search_en = 1; search_key = k;
    @(negedge clk);
    search_en = 0;
    @(negedge clk);           // two cycles after the search cycle
    checks++;
    if (hit !== exp_hit || (exp_hit && idx !== 5'(exp_idx))) begin
      failures++;
      $display("FAIL search: hit=%0d idx=%0d expected hit=%0d idx=%0d", hit, idx, exp_hit, exp_idx);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) begin mv[e] = '0; mm[e] = '0; mval[e] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    search(rnd());                       // empty TCAM: miss
    for (int e = 0; e < E; e++) begin
      logic [KW-1:0] m;
      m = rnd() & rnd();                 // about a quarter of the bits compared
      if (e % 7 == 3) m = '0;            // a full wildcard entry
      write(e, rnd(), m, (e % 5) != 4);
    end
    for (int n = 0; n < 200; n++) begin
      int e; logic [KW-1:0] k;
      e = $urandom_range(E - 1);
      k = (rnd() & ~mm[e]) | mv[e];
      search(n % 4 == 0 ? rnd() : k);
    end
    write(3, '0, '0, 0);                 // delete the first wildcard
    write(10, '0, '0, 0);                // delete the second one
    for (int n = 0; n < 50; n++) search(rnd());
    write(0, {KW{1'b1}}, {KW{1'b1}}, 1); // exact match at the highest priority
    search({KW{1'b1}});
    checks++;
    if (!(hit && idx == 0)) begin failures++; $display("FAIL exact entry 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
