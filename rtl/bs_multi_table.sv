// Multi-table processor: version controller followed by NUM_TABLES flow
// tables in a line.
//
// Every header, dropped or not, passes through every table in order, so a
// header carrying a new V_p commits each table before that table processes it.
// Configuration commands are broadcast; each table takes the ones addressed
// to it by cfg.table_id. At the exit the metadata is reduced to a forwarding
// result (drop, or output mask, or flood to all ports but the input port when
// nothing matched) and commit tokens are discarded. Latency: 4 cycles per
// table, 12 for three tables, one header per cycle. The linear order and the
// flood-on-miss default follow the document.
module bs_multi_table
  import bs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  hdr_t                  in_hdr,
  output logic                  res_valid,
  output res_t                  res,
  input  cfg_t                  cfg,
  output logic                  cfg_ack,
  output logic                  cfg_rej,
  input  logic                  inc_req,
  input  logic [31:0]           timeout,
  output logic                  inc_ok,
  output logic                  inc_rej,
  output logic                  timer_fire,
  output logic                  all_ready,
  output logic [VER_W-1:0]      vp,
  output logic [NUM_TABLES-1:0] primed,
  output logic [NUM_TABLES-1:0] commit,
  output logic [NUM_TABLES-1:0] active_bank,
  output logic [VER_W-1:0]      vi [NUM_TABLES],
  input  logic [NT_W-1:0]       stats_table,
  input  logic [ENTRY_W-1:0]    stats_addr,
  output logic [31:0]           stats_data
);
  logic stage_v [NUM_TABLES+1];
  hdr_t stage_h [NUM_TABLES+1];
  logic [NUM_TABLES-1:0] ack, rej;
  logic [31:0] sdat [NUM_TABLES];

  bs_version_ctrl u_ver (
    .clk, .rst_n,
    .in_valid, .in_hdr,
    .out_valid(stage_v[0]), .out_hdr(stage_h[0]),
    .inc_req, .primed, .vi, .timeout,
    .inc_ok, .inc_rej, .timer_fire, .all_ready, .vp
  );

  for (genvar i = 0; i < NUM_TABLES; i++) begin : g_tbl
    bs_flow_table #(.TABLE_ID(i)) u_tbl (
      .clk, .rst_n,
      .in_valid   (stage_v[i]),   .in_hdr (stage_h[i]),
      .out_valid  (stage_v[i+1]), .out_hdr(stage_h[i+1]),
      .cfg,
      .cfg_ack    (ack[i]),       .cfg_rej(rej[i]),
      .primed     (primed[i]),    .vi     (vi[i]),
      .commit     (commit[i]),    .active_bank(active_bank[i]),
      .stats_addr,                .stats_data(sdat[i])
    );
  end

  assign cfg_ack    = |ack;
  assign cfg_rej    = |rej;
  assign stats_data = (stats_table < NT_W'(NUM_TABLES)) ? sdat[stats_table] : '0;
  assign res_valid  = stage_v[NUM_TABLES] && !stage_h[NUM_TABLES].meta.flush;
  assign res        = make_result(stage_h[NUM_TABLES].meta);
endmodule
