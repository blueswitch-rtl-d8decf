// N-to-1 header arbiter in front of the lookup pipeline.
//
// Each port's header FIFO requests with req[p]; one header per cycle is
// granted, round robin starting after the last granted port, and is
// registered onto out_valid/out_hdr one cycle after the grant (pop[p] is the
// grant and pops the FIFO). A port may have at most CREDITS headers in the
// pipeline whose results its marshaller has not yet taken; ret[p] returns one
// credit. This keeps the non-stalling pipeline from overflowing the per-port
// result FIFOs. Serialising all ports into one pipeline follows the document;
// round robin and the credit scheme are this design's choices.
module bs_in_arbiter
  import bs_pkg::*;
#(
  parameter int unsigned CREDITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] req,
  input  hdr_t                 hdr_in [NUM_PORTS],
  output logic [NUM_PORTS-1:0] pop,
  input  logic [NUM_PORTS-1:0] ret,
  output logic                 out_valid,
  output hdr_t                 out_hdr
);
  localparam int unsigned CW = $clog2(CREDITS + 1);
  logic [CW-1:0]     used_q [NUM_PORTS];
  logic [PORT_W-1:0] last_q;
  logic [NUM_PORTS-1:0] elig;
  logic              gnt_v;
  logic [PORT_W-1:0] gnt_p;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++)
      elig[p] = req[p] && (used_q[p] != CW'(CREDITS));
    gnt_v = 1'b0;
    gnt_p = '0;
    for (int k = NUM_PORTS; k >= 1; k--)
      if (elig[(int'(last_q) + k) % NUM_PORTS]) begin
        gnt_v = 1'b1;
        gnt_p = PORT_W'((int'(last_q) + k) % NUM_PORTS);
      end
    pop = '0;
    if (gnt_v) pop[gnt_p] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q    <= PORT_W'(NUM_PORTS - 1);
      out_valid <= 1'b0;
      out_hdr   <= '0;
      for (int p = 0; p < NUM_PORTS; p++) used_q[p] <= '0;
    end else begin
      out_valid <= gnt_v;
      if (gnt_v) begin
        out_hdr <= hdr_in[gnt_p];
        last_q  <= gnt_p;
      end
      for (int p = 0; p < NUM_PORTS; p++)
        used_q[p] <= used_q[p] + CW'(pop[p]) - CW'(ret[p]);
    end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !(ret[p] && used_q[p] == '0 && !pop[p]));
  end
endmodule
