// Blueswitch: multi-table switch with a packet-consistent configuration
// interface.
//
// NUM_PORTS stream ports (0..3 for the 10GbE MACs, 4 for the host DMA
// engine), 64-bit AXI-Stream in and out, and a 32-bit AXI4-Lite register
// port for the host driver. Per input port, frames are stored in a packet
// FIFO while a header parser extracts the lookup key; headers of all ports
// are serialised by a round-robin arbiter into one pipeline of three
// double-buffered flow tables headed by the version controller; the results
// return through per-port result FIFOs to the packet marshallers, which drop
// the frame or send a copy to each destination through small output FIFOs and
// the crossbar. Configuration goes to the shadow banks through the register
// interface and becomes visible to all tables at once, from the first packet
// stamped with the incremented V_p on.
//
// Latency from the last beat of a frame to its first beat at the output,
// without contention, is 17 cycles, 12 of them in the lookup pipeline; the
// rest is parsing, the header and result FIFOs, the arbiters and the output
// FIFO. Frames are stored and forwarded whole. The structure follows the
// datapath of the document; buffer depths are this design's choices.
module blueswitch_top
  import bs_pkg::*;
#(
  parameter int unsigned PKT_DEPTH       = 512,
  parameter int unsigned HDR_DEPTH       = 8,
  parameter int unsigned ACT_DEPTH       = 8,
  parameter int unsigned OUT_DEPTH       = 4,
  parameter int unsigned TIMEOUT_DEFAULT = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // ingress streams
  input  logic [AXIS_W-1:0] s_tdata  [NUM_PORTS],
  input  logic [KEEP_W-1:0] s_tkeep  [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] s_tlast,
  input  logic [NUM_PORTS-1:0] s_tvalid,
  output logic [NUM_PORTS-1:0] s_tready,
  // egress streams
  output logic [AXIS_W-1:0] m_tdata  [NUM_PORTS],
  output logic [KEEP_W-1:0] m_tkeep  [NUM_PORTS],
  output logic [NUM_PORTS-1:0] m_tlast,
  output logic [NUM_PORTS-1:0] m_tvalid,
  input  logic [NUM_PORTS-1:0] m_tready,
  // register interface
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [7:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready
);
  localparam int unsigned HAW = $clog2(HDR_DEPTH);

  // ---------------- input side ----------------
  logic [NUM_PORTS-1:0] hdr_req, hdr_pop, act_valid, act_pop;
  hdr_t                 hdr_q [NUM_PORTS];
  res_t                 act   [NUM_PORTS];

  logic [NUM_PORTS-1:0] fifo_rd_valid, fifo_rd_pop, fifo_rewind, fifo_release;
  beat_t                fifo_rd_beat [NUM_PORTS];

  logic [NUM_PORTS-1:0] mo_valid, mo_ready;
  beat_t                mo_beat [NUM_PORTS];
  logic [PORT_W-1:0]    mo_dest [NUM_PORTS];

  logic [NUM_PORTS-1:0] xi_valid, xi_ready;
  beat_t                xi_beat [NUM_PORTS];
  logic [PORT_W-1:0]    xi_dest [NUM_PORTS];
  beat_t                xo_beat [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic       wr_ready, acc, hv, hfull, hempty;
    hdr_t       hp;
    logic [HAW:0] hcount;
    beat_t      in_beat;

    assign in_beat     = '{data: s_tdata[p], keep: s_tkeep[p], last: s_tlast[p]};
    // Leave room for a header the parser may emit in the next cycle.
    assign s_tready[p] = wr_ready && (hcount < (HAW+1)'(HDR_DEPTH - 1));
    assign acc         = s_tvalid[p] && s_tready[p];

    bs_pkt_fifo #(.DEPTH(PKT_DEPTH)) u_pkt (
      .clk, .rst_n,
      .wr_valid (acc), .wr_ready, .wr_beat(in_beat),
      .rd_valid (fifo_rd_valid[p]), .rd_beat(fifo_rd_beat[p]), .rd_pop(fifo_rd_pop[p]),
      .rewind   (fifo_rewind[p]),   .release_i(fifo_release[p])
    );

    bs_header_parser #(.PORT_ID(p)) u_parse (
      .clk, .rst_n,
      .beat_valid(acc), .tdata(s_tdata[p]), .tlast(s_tlast[p]),
      .hdr_valid (hv),  .hdr(hp)
    );

    bs_fifo #(.WIDTH($bits(hdr_t)), .DEPTH(HDR_DEPTH)) u_hfifo (
      .clk, .rst_n,
      .push(hv), .din(hp), .full(hfull),
      .pop (hdr_pop[p]), .dout(hdr_q[p]), .empty(hempty), .count(hcount)
    );
    assign hdr_req[p] = !hempty;

    bs_marshaller u_marsh (
      .clk, .rst_n,
      .act_valid(act_valid[p]), .act(act[p]), .act_pop(act_pop[p]),
      .rd_valid (fifo_rd_valid[p]), .rd_beat(fifo_rd_beat[p]), .rd_pop(fifo_rd_pop[p]),
      .rewind   (fifo_rewind[p]),   .release_o(fifo_release[p]),
      .m_tvalid (mo_valid[p]), .m_tready(mo_ready[p]),
      .m_beat   (mo_beat[p]),  .m_tdest (mo_dest[p])
    );

    logic ofull, oempty;
    logic [$clog2(OUT_DEPTH):0] ocount;
    bs_fifo #(.WIDTH($bits(beat_t) + PORT_W), .DEPTH(OUT_DEPTH)) u_ofifo (
      .clk, .rst_n,
      .push (mo_valid[p] && !ofull), .din({mo_beat[p], mo_dest[p]}), .full(ofull),
      .pop  (xi_valid[p] && xi_ready[p]), .dout({xi_beat[p], xi_dest[p]}),
      .empty(oempty), .count(ocount)
    );
    assign mo_ready[p] = !ofull;
    assign xi_valid[p] = !oempty;

    assign m_tdata[p] = xo_beat[p].data;
    assign m_tkeep[p] = xo_beat[p].keep;
    assign m_tlast[p] = xo_beat[p].last;
  end

  // ---------------- lookup ----------------
  logic pipe_v, res_v;
  hdr_t pipe_h;
  res_t res;

  bs_in_arbiter #(.CREDITS(ACT_DEPTH)) u_inarb (
    .clk, .rst_n,
    .req(hdr_req), .hdr_in(hdr_q), .pop(hdr_pop), .ret(act_pop),
    .out_valid(pipe_v), .out_hdr(pipe_h)
  );

  cfg_t                  cfg;
  logic                  cfg_ack, cfg_rej, inc_req, inc_ok, inc_rej, timer_fire, all_ready;
  logic [31:0]           timeout, stats_data;
  logic [VER_W-1:0]      vp;
  logic [VER_W-1:0]      vi [NUM_TABLES];
  logic [NUM_TABLES-1:0] primed, commit, active_bank;
  logic [NT_W-1:0]       stats_table;
  logic [ENTRY_W-1:0]    stats_addr;
  logic [63:0]           cycles;

  bs_multi_table u_mtp (
    .clk, .rst_n,
    .in_valid(pipe_v), .in_hdr(pipe_h),
    .res_valid(res_v), .res,
    .cfg, .cfg_ack, .cfg_rej,
    .inc_req, .timeout, .inc_ok, .inc_rej, .timer_fire, .all_ready, .vp,
    .primed, .commit, .active_bank, .vi,
    .stats_table, .stats_addr, .stats_data
  );

  bs_act_arbiter #(.DEPTH(ACT_DEPTH)) u_actarb (
    .clk, .rst_n,
    .in_valid(res_v), .in_res(res),
    .act_valid, .act, .act_pop
  );

  // ---------------- output crossbar ----------------
  bs_xbar u_xbar (
    .clk, .rst_n,
    .s_tvalid(xi_valid), .s_tready(xi_ready), .s_beat(xi_beat), .s_tdest(xi_dest),
    .m_tvalid, .m_tready, .m_beat(xo_beat)
  );

  // ---------------- control ----------------
  bs_cycle_counter #(.W(64)) u_cyc (.clk, .rst_n, .count(cycles));

  bs_reg_if #(.ADDR_W(8), .TIMEOUT_DEFAULT(TIMEOUT_DEFAULT)) u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .cfg, .inc_req, .timeout, .stats_table, .stats_addr, .stats_data,
    .cycles, .cfg_ack, .cfg_rej, .inc_rej, .timer_fire,
    .commit_last(commit[NUM_TABLES-1]),
    .all_ready, .vp, .primed, .active_bank, .vi
  );
endmodule
