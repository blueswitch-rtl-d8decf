// Register interface: 32-bit AXI4-Lite slave used by the host driver.
//
// The driver builds a configuration command in the CMD_* and KEY/MASK
// registers and issues it by writing its opcode to CMD_OP; one cycle later
// the command is presented to the tables for one cycle. Writing 1 to CTRL
// bit 0 requests the V_p increment. Status, command counters, per-table
// versions, match statistics and the free-running cycle counter are read
// back. Reading CYCLE_LO latches the upper half for a following CYCLE_HI read.
// Writes complete when AW and W are both valid (one write in flight, response
// OKAY); reads return one cycle after the address. Unmapped addresses read 0.
// The existence of a register interface for table updates and the version
// trigger follows the document; the register map is this design's own:
//   0x00 CTRL     W: bit0 = increment V_p   R: [7:0] V_p, [8] increment allowed
//   0x04 STATUS   R: [NUM_TABLES-1:0] Primed, [15:8] active bank per table
//   0x08 CYCLE_LO R   0x0C CYCLE_HI R
//   0x10 TIMEOUT  RW inactivity timer length in cycles
//   0x14 CMD_TABLE RW  0x18 CMD_ADDR RW  0x1C CMD_ACTION RW
//        action word: [7:0] output mask, [8] Output, [9] Drop,
//                     [12] GotoTable, [19:16] goto table
//   0x20 CMD_OP   W: 0 write entry, 1 clear entry, 2 EndTxn
//   0x24 CMD_ACCEPTED R  0x28 CMD_REJECTED R  0x2C INC_REJECTED R
//   0x30 TIMER_FIRES R   0x34 COMMITS R (commits seen by the last table)
//   0x38 STATS_SEL RW: [7:0] entry, [11:8] table   0x3C STATS_DATA R
//   0x40 + 4w KEY value word w, 0x60 + 4w KEY mask word w (w = 0..6,
//        word w = key bits [32w+31:32w])
//   0x80 + 4i V_i of table i (read)
module bs_reg_if
  import bs_pkg::*;
#(
  parameter int unsigned ADDR_W          = 8,
  parameter int unsigned TIMEOUT_DEFAULT = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [ADDR_W-1:0]     s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [31:0]           s_axil_wdata,
  input  logic [3:0]            s_axil_wstrb,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [ADDR_W-1:0]     s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [31:0]           s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  output cfg_t                  cfg,
  output logic                  inc_req,
  output logic [31:0]           timeout,
  output logic [NT_W-1:0]       stats_table,
  output logic [ENTRY_W-1:0]    stats_addr,
  input  logic [31:0]           stats_data,
  input  logic [63:0]           cycles,
  input  logic                  cfg_ack,
  input  logic                  cfg_rej,
  input  logic                  inc_rej,
  input  logic                  timer_fire,
  input  logic                  commit_last,
  input  logic                  all_ready,
  input  logic [VER_W-1:0]      vp,
  input  logic [NUM_TABLES-1:0] primed,
  input  logic [NUM_TABLES-1:0] active_bank,
  input  logic [VER_W-1:0]      vi [NUM_TABLES]
);
  localparam int unsigned KW = (KEY_W + 31) / 32;

  logic [31:0] key_w [KW];
  logic [31:0] msk_w [KW];
  logic [31:0] tbl_q, addr_q, act_q, ssel_q, cyc_hi_q;
  logic [31:0] n_acc, n_rej, n_inc_rej, n_fire, n_commit;

  logic do_wr, do_rd;
  assign do_wr          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = do_wr;
  assign s_axil_wready  = do_wr;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;
  assign do_rd          = s_axil_arvalid && s_axil_arready;
  assign s_axil_rresp   = 2'b00;

  // Byte-strobe merge of a register's old value with the written data.
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  key_t key_v, key_m;
  always_comb begin
    logic [KW*32-1:0] kv, km;
    for (int w = 0; w < KW; w++) begin
      kv[32*w +: 32] = key_w[w];
      km[32*w +: 32] = msk_w[w];
    end
    key_v = key_t'(kv[KEY_W-1:0]);
    key_m = key_t'(km[KEY_W-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_bvalid <= 1'b0;
      tbl_q   <= '0;
      addr_q  <= '0;
      act_q   <= '0;
      ssel_q  <= '0;
      timeout <= TIMEOUT_DEFAULT;
      inc_req <= 1'b0;
      cfg     <= '0;
      for (int w = 0; w < KW; w++) begin
        key_w[w] <= '0;
        msk_w[w] <= '0;
      end
    end else begin
      inc_req   <= 1'b0;
      cfg.valid <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (do_wr) begin
        s_axil_bvalid <= 1'b1;
        unique case (s_axil_awaddr[ADDR_W-1:2])
          6'h00: inc_req <= s_axil_wstrb[0] && s_axil_wdata[0];
          6'h04: timeout <= merge(timeout, s_axil_wdata, s_axil_wstrb);
          6'h05: tbl_q   <= merge(tbl_q,   s_axil_wdata, s_axil_wstrb);
          6'h06: addr_q  <= merge(addr_q,  s_axil_wdata, s_axil_wstrb);
          6'h07: act_q   <= merge(act_q,   s_axil_wdata, s_axil_wstrb);
          6'h08: begin
            cfg.valid      <= 1'b1;
            cfg.op         <= cfg_op_e'(s_axil_wdata[1:0]);
            cfg.table_id   <= tbl_q[NT_W-1:0];
            cfg.addr       <= addr_q[ENTRY_W-1:0];
            cfg.value      <= key_v;
            cfg.mask       <= key_m;
            cfg.action.out_mask   <= act_q[NUM_PORTS-1:0];
            cfg.action.out_valid  <= act_q[8];
            cfg.action.drop       <= act_q[9];
            cfg.action.goto_valid <= act_q[12];
            cfg.action.goto_table <= act_q[16 +: NT_W];
          end
          6'h0E: ssel_q  <= merge(ssel_q, s_axil_wdata, s_axil_wstrb);
          default: begin
            for (int w = 0; w < KW; w++) begin
              if (s_axil_awaddr[ADDR_W-1:2] == 6'(16 + w)) key_w[w] <= merge(key_w[w], s_axil_wdata, s_axil_wstrb);
              if (s_axil_awaddr[ADDR_W-1:2] == 6'(24 + w)) msk_w[w] <= merge(msk_w[w], s_axil_wdata, s_axil_wstrb);
            end
          end
        endcase
      end
    end
  end

  // Event counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_acc <= '0; n_rej <= '0; n_inc_rej <= '0; n_fire <= '0; n_commit <= '0;
    end else begin
      n_acc     <= n_acc     + 32'(cfg_ack);
      n_rej     <= n_rej     + 32'(cfg_rej);
      n_inc_rej <= n_inc_rej + 32'(inc_rej);
      n_fire    <= n_fire    + 32'(timer_fire);
      n_commit  <= n_commit  + 32'(commit_last);
    end
  end

  assign stats_table = ssel_q[8 +: NT_W];
  assign stats_addr  = ssel_q[ENTRY_W-1:0];

  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    unique case (s_axil_araddr[ADDR_W-1:2])
      6'h00: rd_mux = {23'd0, all_ready, 8'(vp)};
      6'h01: rd_mux = {16'd0, 8'(active_bank), 8'(primed)};
      6'h02: rd_mux = cycles[31:0];
      6'h03: rd_mux = cyc_hi_q;
      6'h04: rd_mux = timeout;
      6'h05: rd_mux = tbl_q;
      6'h06: rd_mux = addr_q;
      6'h07: rd_mux = act_q;
      6'h09: rd_mux = n_acc;
      6'h0A: rd_mux = n_rej;
      6'h0B: rd_mux = n_inc_rej;
      6'h0C: rd_mux = n_fire;
      6'h0D: rd_mux = n_commit;
      6'h0E: rd_mux = ssel_q;
      6'h0F: rd_mux = stats_data;
      default: begin
        for (int w = 0; w < KW; w++) begin
          if (s_axil_araddr[ADDR_W-1:2] == 6'(16 + w)) rd_mux = key_w[w];
          if (s_axil_araddr[ADDR_W-1:2] == 6'(24 + w)) rd_mux = msk_w[w];
        end
        for (int i = 0; i < NUM_TABLES; i++)
          if (s_axil_araddr[ADDR_W-1:2] == 6'(32 + i)) rd_mux = 32'(vi[i]);
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      cyc_hi_q      <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (do_rd) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= rd_mux;
        if (s_axil_araddr[ADDR_W-1:2] == 6'h02) cyc_hi_q <= cycles[63:32];
      end
    end
  end
endmodule
