// Head of the lookup pipeline: pipeline version V_p and inactivity timer.
//
// Every header entering the pipeline is stamped with the current V_p and
// forwarded in the same cycle (combinational path, no added latency). The
// software's increment request (inc_req, one-cycle pulse) is honoured only if
// every table is Primed and has already caught up with the current V_p; it
// is otherwise refused (inc_rej). After an increment the inactivity timer
// counts down from `timeout`; if no header enters before it expires, a commit
// token (flush = 1, no key) carrying the new V_p is injected in an idle cycle.
// It travels through every table in order and commits each of them, exactly
// as a packet would; the pipeline exit discards it. A header entering while
// the timer runs disarms it, since that header carries the commit itself.
// The V_p stamping, the Primed-only increment and the timer follow the
// document; the extra "caught up" condition, the token mechanism and the
// timer length are this design's choices.
module bs_version_ctrl
  import bs_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  hdr_t                  in_hdr,
  output logic                  out_valid,
  output hdr_t                  out_hdr,
  input  logic                  inc_req,
  input  logic [NUM_TABLES-1:0] primed,
  input  logic [VER_W-1:0]      vi [NUM_TABLES],
  input  logic [31:0]           timeout,
  output logic                  inc_ok,
  output logic                  inc_rej,
  output logic                  timer_fire,
  output logic                  all_ready,
  output logic [VER_W-1:0]      vp
);
  logic [VER_W-1:0] vp_q;
  logic             armed_q;
  logic [31:0]      cnt_q;

  always_comb begin
    all_ready = 1'b1;
    for (int i = 0; i < NUM_TABLES; i++)
      all_ready &= primed[i] && (vi[i] == vp_q);
  end

  assign inc_ok     = inc_req && all_ready;
  assign inc_rej    = inc_req && !all_ready;
  assign timer_fire = armed_q && (cnt_q == '0) && !in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vp_q    <= '0;
      armed_q <= 1'b0;
      cnt_q   <= '0;
    end else begin
      if (inc_ok) begin
        vp_q    <= vp_q + VER_W'(1);
        armed_q <= 1'b1;
        cnt_q   <= timeout;
      end else if (armed_q) begin
        if (in_valid || timer_fire) armed_q <= 1'b0;
        else if (cnt_q != '0)       cnt_q   <= cnt_q - 32'd1;
      end
    end
  end

  always_comb begin
    out_valid = in_valid || timer_fire;
    out_hdr   = in_hdr;
    if (!in_valid) begin
      out_hdr            = '0;
      out_hdr.meta.flush = 1'b1;
      out_hdr.meta.drop  = 1'b1;
    end
    out_hdr.meta.version = vp_q;
  end
  assign vp = vp_q;
endmodule
