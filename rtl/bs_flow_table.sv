// One double-buffered flow table of the lookup pipeline.
//
// Two TCAM + action-RAM pairs ("banks"). The active bank matches packets; the
// shadow bank takes configuration commands. The transactional state S_i is
// Open (commands accepted into the shadow) or Primed (after EndTxn: further
// commands are refused). The table version V_i is compared with the version
// V_p carried in each arriving header: when a Primed table sees V_p != V_i it
// swaps the banks, sets V_i = V_p and returns to Open in the same cycle, so
// that this header and every later one use the new bank and every earlier one
// the old bank. A commit token (flush) from the inactivity timer triggers the
// same swap without being matched.
//
// Pipeline, one header per cycle, no back-pressure, latency 4 cycles:
//   t   : commit decision, key presented to the active TCAM
//   t+2 : TCAM hit/index, selected by the bank bit delayed by D_T (2 cycles),
//         read from the action RAMs
//   t+3 : action word, selected by the bank bit delayed again by D_A (1 cycle),
//         applied to the metadata; match statistics counted
//   t+4 : out_valid/out_hdr
// The header waits in a buffer of the same length. Configuration writes to the
// action RAMs pass through D_i (2 cycles) so that a write into the bank that
// was just demoted lands only after the last older header has read it.
//
// Table semantics: a header is matched only if it is not dropped and its
// next_table is this table; a hit applies Output (sets the output mask),
// Drop and GotoTable (sets next_table), and a hit without GotoTable ends
// matching; a miss hands the header on to the next table. The double buffering,
// Open/Primed states, the commit rule and the D_T/D_i/D_A delays follow the
// document; the latencies, the miss rule and the statistics format are this
// design's choices.
module bs_flow_table
  import bs_pkg::*;
#(
  parameter int unsigned TABLE_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  hdr_t               in_hdr,
  output logic               out_valid,
  output hdr_t               out_hdr,
  input  cfg_t               cfg,
  output logic               cfg_ack,
  output logic               cfg_rej,
  output logic               primed,
  output logic [VER_W-1:0]   vi,
  output logic               commit,
  output logic               active_bank,
  input  logic [ENTRY_W-1:0] stats_addr,
  output logic [31:0]        stats_data
);
  localparam int unsigned TLAT = 2; // TCAM lookup latency = D_T = D_i
  localparam int unsigned ALAT = 1; // action RAM latency  = D_A
  localparam int unsigned LAT  = TLAT + ALAT;

  typedef enum logic {ST_OPEN = 1'b0, ST_PRIMED = 1'b1} tstate_e;
  tstate_e state_q;
  logic    active_q;
  logic [VER_W-1:0] vi_q;

  // ---------------- transactional state S_i ----------------
  logic for_me, accept;
  assign for_me  = cfg.valid && (cfg.table_id == NT_W'(TABLE_ID));
  assign accept  = for_me && (state_q == ST_OPEN);
  assign cfg_ack = accept;
  assign cfg_rej = for_me && (state_q == ST_PRIMED);

  logic ver_new, do_commit, sel_now;
  assign ver_new   = in_valid && (in_hdr.meta.version != vi_q);
  assign do_commit = ver_new && (state_q == ST_PRIMED);
  assign sel_now   = do_commit ? ~active_q : active_q;
  assign commit    = do_commit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= ST_OPEN;
      active_q <= 1'b0;
      vi_q     <= '0;
    end else begin
      if (ver_new) vi_q <= in_hdr.meta.version;
      if (do_commit) begin
        active_q <= ~active_q;
        state_q  <= ST_OPEN;
      end else if (accept && cfg.op == CFG_ENDTXN) begin
        state_q  <= ST_PRIMED;
      end
    end
  end

  // ---------------- shadow writes ----------------
  logic tcam_we, tcam_wvalid;
  assign tcam_we     = accept && (cfg.op == CFG_WRITE || cfg.op == CFG_CLEAR);
  assign tcam_wvalid = (cfg.op == CFG_WRITE);

  // D_i: action writes and their bank select, delayed by TLAT.
  typedef struct packed {
    logic               we;
    logic               bank;
    logic [ENTRY_W-1:0] addr;
    act_t               data;
  } awr_t;
  awr_t d_i [TLAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TLAT; k++) d_i[k] <= '0;
    end else begin
      d_i[0].we   <= tcam_we;
      d_i[0].bank <= ~active_q;
      d_i[0].addr <= cfg.addr;
      d_i[0].data <= tcam_wvalid ? cfg.action : '0;
      for (int k = 1; k < TLAT; k++) d_i[k] <= d_i[k-1];
    end
  end

  logic di_busy;
  always_comb begin
    di_busy = 1'b0;
    for (int k = 0; k < TLAT; k++) di_busy |= d_i[k].we;
  end
  assign primed      = (state_q == ST_PRIMED) && !di_busy;
  assign vi          = vi_q;
  assign active_bank = active_q;

  // ---------------- lookup ----------------
  logic do_match;
  assign do_match = in_valid && !in_hdr.meta.flush && !in_hdr.meta.drop &&
                    (in_hdr.meta.next_table == NT_W'(TABLE_ID));

  logic               t_hit [2];
  logic [ENTRY_W-1:0] t_idx [2];
  act_t               a_dat [2];

  // D_T and D_A: bank select travelling with the lookup.
  logic [LAT-1:0] d_sel;
  logic [LAT-1:0] d_match;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_sel   <= '0;
      d_match <= '0;
    end else begin
      d_sel   <= {d_sel[LAT-2:0], sel_now};
      d_match <= {d_match[LAT-2:0], do_match};
    end
  end

  logic               sel_t, sel_a;
  logic               hit_t;
  logic [ENTRY_W-1:0] idx_t;
  assign sel_t = d_sel[TLAT-1];
  assign sel_a = d_sel[LAT-1];
  assign hit_t = t_hit[sel_t];
  assign idx_t = t_idx[sel_t];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    bs_tcam #(.ENTRIES(ENTRIES), .KEY_W(KEY_W)) u_tcam (
      .clk, .rst_n,
      .wr_en     (tcam_we && (active_q != 1'(b))),
      .wr_addr   (cfg.addr),
      .wr_value  (cfg.value),
      .wr_mask   (cfg.mask),
      .wr_valid  (tcam_wvalid),
      .search_en (do_match && (sel_now == 1'(b))),
      .search_key(in_hdr.key),
      .hit       (t_hit[b]),
      .idx       (t_idx[b])
    );
    bs_action_ram #(.ENTRIES(ENTRIES), .W($bits(act_t))) u_act (
      .clk, .rst_n,
      .we   (d_i[TLAT-1].we && (d_i[TLAT-1].bank == 1'(b))),
      .waddr(d_i[TLAT-1].addr),
      .wdata(d_i[TLAT-1].data),
      .re   (d_match[TLAT-1] && (sel_t == 1'(b))),
      .raddr(idx_t),
      .rdata(a_dat[b])
    );
  end

  // Header buffer and hit/index alignment to the action stage.
  hdr_t               buf_q [LAT];
  logic [LAT-1:0]     vbuf_q;
  logic               hit_a;
  logic [ENTRY_W-1:0] idx_a;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vbuf_q <= '0;
      hit_a  <= 1'b0;
      idx_a  <= '0;
      for (int k = 0; k < LAT; k++) buf_q[k] <= '0;
    end else begin
      vbuf_q   <= {vbuf_q[LAT-2:0], in_valid};
      buf_q[0] <= in_hdr;
      for (int k = 1; k < LAT; k++) buf_q[k] <= buf_q[k-1];
      hit_a <= d_match[TLAT-1] && hit_t;
      idx_a <= idx_t;
    end
  end

  // ---------------- apply actions ----------------
  act_t act;
  hdr_t nxt;
  assign act = a_dat[sel_a];
  always_comb begin
    nxt = buf_q[LAT-1];
    if (d_match[LAT-1]) begin
      if (hit_a) begin
        if (act.out_valid) begin
          nxt.meta.out_valid = 1'b1;
          nxt.meta.out_mask  = act.out_mask;
        end
        if (act.drop) nxt.meta.drop = 1'b1;
        nxt.meta.next_table = act.goto_valid ? act.goto_table : NT_W'(NUM_TABLES);
      end else begin
        nxt.meta.next_table = NT_W'(TABLE_ID + 1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hdr   <= '0;
    end else begin
      out_valid <= vbuf_q[LAT-1];
      out_hdr   <= nxt;
    end
  end

  // ---------------- match statistics ----------------
  logic [31:0] stats_q [ENTRIES];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) stats_q[e] <= '0;
    end else if (d_match[LAT-1] && hit_a) begin
      stats_q[idx_a] <= stats_q[idx_a] + 32'd1;
    end
  end
  assign stats_data = stats_q[stats_addr];

  // S3: nothing is written into the shadow while Primed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == ST_PRIMED) |-> !tcam_we);
endmodule
