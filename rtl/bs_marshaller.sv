// Per-port packet marshaller.
//
// Pairs the next forwarding result of its port with the next frame in the
// port's packet FIFO (both are in arrival order, since the lookup pipeline
// keeps order). A dropped frame, or one with an empty output mask, is read out
// and discarded. Otherwise one copy is sent per port in the mask, lowest port
// first, each tagged with m_tdest; between copies the FIFO is rewound to the
// frame start, and after the last copy the frame is released and the result
// popped. The stream side is AXI-Stream style: a beat moves when m_tvalid and
// m_tready are both high. A result is only present once its whole frame is in
// the FIFO (the header is parsed at the frame's end), so reading never waits
// for data in the middle of a frame. Pairing results with frames follows the
// document; sequential copies for multicast are this design's choice.
module bs_marshaller
  import bs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              act_valid,
  input  res_t              act,
  output logic              act_pop,
  input  logic              rd_valid,
  input  beat_t             rd_beat,
  output logic              rd_pop,
  output logic              rewind,
  output logic              release_o,
  output logic              m_tvalid,
  input  logic              m_tready,
  output beat_t             m_beat,
  output logic [PORT_W-1:0] m_tdest
);
  typedef enum logic [1:0] {M_IDLE, M_SEND, M_DISCARD} mstate_e;
  mstate_e              state_q;
  logic [NUM_PORTS-1:0] rem_q;

  function automatic logic [PORT_W-1:0] lowest(logic [NUM_PORTS-1:0] m);
    logic [PORT_W-1:0] r;
    r = '0;
    for (int p = NUM_PORTS - 1; p >= 0; p--) if (m[p]) r = PORT_W'(p);
    return r;
  endfunction

  logic [NUM_PORTS-1:0] rem_next;
  logic                 xfer, last_beat;
  assign m_beat    = rd_beat;
  assign m_tdest   = lowest(rem_q);
  assign m_tvalid  = (state_q == M_SEND) && rd_valid;
  assign xfer      = m_tvalid && m_tready;
  assign rem_next  = rem_q & ~(NUM_PORTS'(1) << m_tdest);
  assign last_beat = rd_valid && rd_beat.last;

  always_comb begin
    rd_pop    = 1'b0;
    rewind    = 1'b0;
    release_o = 1'b0;
    act_pop   = 1'b0;
    unique case (state_q)
      M_SEND: begin
        rd_pop = xfer;
        if (xfer && last_beat) begin
          if (rem_next != '0) rewind = 1'b1;
          else begin
            release_o = 1'b1;
            act_pop   = 1'b1;
          end
        end
      end
      M_DISCARD: begin
        rd_pop = rd_valid;
        if (last_beat) begin
          release_o = 1'b1;
          act_pop   = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_IDLE;
      rem_q   <= '0;
    end else begin
      unique case (state_q)
        M_IDLE: if (act_valid) begin
          if (act.drop || act.out_mask == '0) state_q <= M_DISCARD;
          else begin
            state_q <= M_SEND;
            rem_q   <= act.out_mask;
          end
        end
        M_SEND: if (xfer && last_beat) begin
          rem_q <= rem_next;
          if (rem_next == '0) state_q <= M_IDLE;
        end
        M_DISCARD: if (last_beat) state_q <= M_IDLE;
        default: state_q <= M_IDLE;
      endcase
    end
  end

  // AXI-Stream rule: a presented beat stays until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_tvalid && !m_tready |=> m_tvalid && $stable(m_beat) && $stable(m_tdest));
endmodule
