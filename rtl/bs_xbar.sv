// Output crossbar: NUM_PORTS marshallers to NUM_PORTS output ports.
//
// The 1-to-N side of each input is the decode of its m_tdest. Each output
// has an N-to-1 arbiter that picks, round robin after its last owner, one of
// the inputs whose current beat is destined for it, passes that input's
// beats straight through (no register stage) and stays locked to it until the
// frame's last beat has been taken. Because every input targets one output
// at a time, the locks cannot wait on each other. Handshake: AXI-Stream
// valid/ready on both sides. The 1-to-N / N-to-1 structure follows the
// document; round robin and frame locking are this design's choices.
module bs_xbar
  import bs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] s_tvalid,
  output logic [NUM_PORTS-1:0] s_tready,
  input  beat_t                s_beat  [NUM_PORTS],
  input  logic [PORT_W-1:0]    s_tdest [NUM_PORTS],
  output logic [NUM_PORTS-1:0] m_tvalid,
  input  logic [NUM_PORTS-1:0] m_tready,
  output beat_t                m_beat  [NUM_PORTS]
);
  logic [NUM_PORTS-1:0] lock_q;
  logic [PORT_W-1:0]    own_q [NUM_PORTS];
  logic [PORT_W-1:0]    sel   [NUM_PORTS];
  logic [NUM_PORTS-1:0] sel_v;

  // Round-robin pick among the requesting inputs, starting after `last`.
  function automatic logic [PORT_W:0] rr_pick(logic [NUM_PORTS-1:0] r, logic [PORT_W-1:0] last);
    logic [PORT_W:0] g;
    g = '0;
    for (int k = NUM_PORTS; k >= 1; k--)
      if (r[(int'(last) + k) % NUM_PORTS]) g = {1'b1, PORT_W'((int'(last) + k) % NUM_PORTS)};
    return g;
  endfunction

  logic [NUM_PORTS-1:0] req [NUM_PORTS];
  logic [PORT_W:0]      pick [NUM_PORTS];

  always_comb begin
    s_tready = '0;
    m_tvalid = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int i = 0; i < NUM_PORTS; i++)
        req[o][i] = s_tvalid[i] && (s_tdest[i] == PORT_W'(o));
      pick[o]  = rr_pick(req[o], own_q[o]);
      sel_v[o] = lock_q[o] || pick[o][PORT_W];
      sel[o]   = lock_q[o] ? own_q[o] : pick[o][PORT_W-1:0];
      m_tvalid[o] = sel_v[o] && s_tvalid[sel[o]] && (s_tdest[sel[o]] == PORT_W'(o));
      m_beat[o]   = s_beat[sel[o]];
      if (sel_v[o] && m_tready[o] && s_tdest[sel[o]] == PORT_W'(o))
        s_tready[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q <= '0;
      for (int o = 0; o < NUM_PORTS; o++) own_q[o] <= '0;
    end else begin
      for (int o = 0; o < NUM_PORTS; o++)
        if (m_tvalid[o] && m_tready[o]) begin
          own_q[o]  <= sel[o];
          lock_q[o] <= !m_beat[o].last;
        end
    end
  end
endmodule
