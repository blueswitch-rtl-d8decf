// Self-checking test of the AXI4-Lite register interface: register
// read-back, byte strobes, command assembly (key/mask words, action word,
// table, entry, opcode) and its one-cycle pulse, the increment pulse, event
// counters, status words, per-table versions, statistics selection and the
// latched 64-bit cycle counter read.
module tb_bs_reg_if;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_cfg = 0, n_inc = 0;

  logic [7:0] s_axil_awaddr = '0, s_axil_araddr = '0;
  logic s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_rready = 0;
  logic s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0] s_axil_wstrb = '0;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  cfg_t cfg; logic inc_req; logic [31:0] timeout;
  logic [NT_W-1:0] stats_table; logic [ENTRY_W-1:0] stats_addr;
  logic [31:0] stats_data;
  logic [63:0] cycles = 64'h0000_0012_3456_0000;
  logic cfg_ack = 0, cfg_rej = 0, inc_rej = 0, timer_fire = 0, commit_last = 0, all_ready = 1;
  logic [VER_W-1:0] vp = 8'h5A;
  logic [NUM_TABLES-1:0] primed = 3'b101, active_bank = 3'b010;
  logic [VER_W-1:0] vi [NUM_TABLES];

  bs_reg_if dut (.*);
  assign stats_data = {16'hBEEF, 4'(stats_table), 7'd0, 5'(stats_addr)};
  always @(posedge clk) cycles <= cycles + 1;

  cfg_t last_cfg;
  always @(posedge clk) if (rst_n) begin
    if (cfg.valid) begin n_cfg++; last_cfg <= cfg; end
    if (inc_req) n_inc++;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d, logic [3:0] be = 4'hF);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_awvalid = 1; s_axil_wdata = d; s_axil_wstrb = be; s_axil_wvalid = 1; s_axil_bready = 1;
    #1; while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(posedge clk); #1; s_axil_awvalid = 0; s_axil_wvalid = 0;
    @(posedge clk); while (!s_axil_bvalid) @(posedge clk);
    #1; s_axil_bready = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1; s_axil_rready = 1;
    #1; while (!s_axil_arready) begin @(negedge clk); #1; end
    @(posedge clk); #1; s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(posedge clk);
    d = s_axil_rdata;
    @(posedge clk); #1; s_axil_rready = 0;
  endtask

  task automatic expect_rd(logic [7:0] a, logic [31:0] e, string s);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s: read %h expected %h", s, d, e); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] lo, hi; key_t kv, km; logic [7*32-1:0] w;
    vi[0] = 3; vi[1] = 4; vi[2] = 5;
    repeat (2) @(negedge clk); rst_n = 1;
    expect_rd(8'h10, 32'd1024, "timeout default");
    wr(8'h10, 32'd77);
    expect_rd(8'h10, 32'd77, "timeout");
    wr(8'h10, 32'hAABBCCDD, 4'b0100);
    expect_rd(8'h10, 32'h00BB004D, "byte strobe");
    expect_rd(8'h00, {23'd0, 1'b1, 8'h5A}, "ctrl");
    expect_rd(8'h04, {16'd0, 8'b010, 8'b101}, "status");
    expect_rd(8'h80, 32'd3, "vi0");
    expect_rd(8'h88, 32'd5, "vi2");
    // command assembly
    for (int i = 0; i < 7; i++) begin
      w[32*i +: 32] = $urandom;
      wr(8'(8'h40 + 4*i), w[32*i +: 32]);
    end
    kv = key_t'(w);
    for (int i = 0; i < 7; i++) begin
      w[32*i +: 32] = $urandom;
      wr(8'(8'h60 + 4*i), w[32*i +: 32]);
    end
    km = key_t'(w);
    expect_rd(8'h48, kv[95:64], "key word 2");
    wr(8'h14, 32'd2); wr(8'h18, 32'd17);
    wr(8'h1C, 32'h0002_1316);              // goto 2, goto_valid, drop, out_valid, mask 0x16
    wr(8'h20, 32'd0);
    repeat (2) @(negedge clk);
    checks++;
    if (n_cfg != 1 || last_cfg.op != CFG_WRITE || last_cfg.table_id != 2 || last_cfg.addr != 17 ||
        last_cfg.value !== kv || last_cfg.mask !== km || last_cfg.action.out_mask != 5'h16 ||
        !last_cfg.action.out_valid || !last_cfg.action.drop || !last_cfg.action.goto_valid ||
        last_cfg.action.goto_table != 2) begin failures++; $display("FAIL command fields n=%0d op=%0d t=%0d a=%0d act=%h", n_cfg, last_cfg.op, last_cfg.table_id, last_cfg.addr, last_cfg.action); end
    wr(8'h20, 32'd2);
    repeat (2) @(negedge clk);
    checks++;
    if (n_cfg != 2 || last_cfg.op != CFG_ENDTXN) begin failures++; $display("FAIL EndTxn"); end
    // increment pulse
    wr(8'h00, 32'd1);
    wr(8'h00, 32'd0);
    repeat (2) @(negedge clk);
    checks++; if (n_inc != 1) begin failures++; $display("FAIL increment pulses %0d", n_inc); end
    // counters
    for (int n = 0; n < 5; n++) begin
      @(negedge clk); cfg_ack = 1; cfg_rej = (n < 2); inc_rej = (n < 3); timer_fire = (n == 0); commit_last = (n < 4);
    end
    @(negedge clk); cfg_ack = 0; cfg_rej = 0; inc_rej = 0; timer_fire = 0; commit_last = 0;
    expect_rd(8'h24, 5, "accepted");
    expect_rd(8'h28, 2, "rejected");
    expect_rd(8'h2C, 3, "increments refused");
    expect_rd(8'h30, 1, "timer fires");
    expect_rd(8'h34, 4, "commits");
    // statistics selection
    wr(8'h38, 32'h0000_0109);
    expect_rd(8'h3C, {16'hBEEF, 4'd1, 7'd0, 5'd9}, "stats");
    // cycle counter: hi latched with lo
    rd(8'h08, lo); rd(8'h0C, hi);
    checks++;
    if (hi != 32'h12 || lo < 32'h3456_0000) begin failures++; $display("FAIL cycles %h %h", hi, lo); end
    expect_rd(8'hFC, 0, "unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
