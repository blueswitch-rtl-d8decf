// Self-checking test of the version controller.
//
// Checks that every header leaves in the same cycle stamped with V_p; that
// an increment is refused unless all tables are Primed and at V_p; that an
// accepted increment arms the inactivity timer, which injects exactly one
// commit token after `timeout` idle cycles carrying the new V_p; and that a
// header arriving before expiry disarms it.
module tb_bs_version_ctrl;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_fire = 0, n_rej = 0, n_ok = 0;

  logic in_valid = 0, inc_req = 0;
  hdr_t in_hdr = '0, out_hdr;
  logic out_valid, inc_ok, inc_rej, timer_fire, all_ready;
  logic [NUM_TABLES-1:0] primed = '0;
  logic [VER_W-1:0] vi [NUM_TABLES];
  logic [VER_W-1:0] vp;
  logic [31:0] timeout = 20;

  bs_version_ctrl dut (.*);

  task automatic chk(logic c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic try_inc(logic expect_ok);
    @(negedge clk); inc_req = 1; #1;
    chk(inc_ok == expect_ok && inc_rej == !expect_ok, "increment gating");
    if (inc_ok) n_ok++; else n_rej++;
    @(negedge clk); inc_req = 0;
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (timer_fire) n_fire++;

  initial begin
    logic [VER_W-1:0] v;
    for (int i = 0; i < NUM_TABLES; i++) vi[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // pass-through with stamping
    for (int n = 0; n < 10; n++) begin
      @(negedge clk); in_valid = 1; in_hdr = '0; in_hdr.key.ip_dst = $urandom; in_hdr.meta.version = 8'hAA; #1;
      chk(out_valid && out_hdr.key == in_hdr.key && out_hdr.meta.version == vp && !out_hdr.meta.flush, "stamp");
    end
    @(negedge clk); in_valid = 0;
    // S2: refused while any table is Open
    primed = 3'b011; try_inc(0);
    primed = 3'b111; try_inc(1);
    chk(vp == 1, "vp incremented");
    // tables primed but not yet at V_p: refused
    try_inc(0);
    // timer: count idle cycles until the token
    v = vp;
    begin
      int t; t = 0;
      while (!timer_fire && t < 100) begin @(negedge clk); #1; t++; end
      chk(timer_fire && out_valid && out_hdr.meta.flush && out_hdr.meta.version == v, "token");
      chk(t + 2 == 20, $sformatf("timer length %0d", t)); // 20 cycles after the increment cycle
    end
    for (int i = 0; i < NUM_TABLES; i++) vi[i] = v;
    repeat (50) @(negedge clk);
    chk(n_fire == 1, "single token");
    // increment followed by traffic: no token
    try_inc(1);
    repeat (5) @(negedge clk);
    in_valid = 1; in_hdr = '0; #1;
    chk(out_hdr.meta.version == vp && !out_hdr.meta.flush, "header carries new version");
    @(negedge clk); in_valid = 0;
    repeat (60) @(negedge clk);
    chk(n_fire == 1, "timer disarmed by traffic");
    $display("ok=%0d refused=%0d fires=%0d", n_ok, n_rej, n_fire);
    chk(n_ok == 2 && n_rej == 2, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
