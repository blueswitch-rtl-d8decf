// 1-to-N result arbiter at the end of the lookup pipeline.
//
// Each forwarding result leaving the pipeline is written into the result FIFO
// of the port the packet arrived on (res.in_port). Each marshaller reads its
// FIFO with act_valid/act/act_pop (show-ahead). The FIFOs never overflow
// because the header arbiter hands out at most DEPTH credits per port; this is
// checked by an assertion in the FIFO. The routing by input port follows the
// document; the FIFO depth is this design's choice.
module bs_act_arbiter
  import bs_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  res_t                 in_res,
  output logic [NUM_PORTS-1:0] act_valid,
  output res_t                 act [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] act_pop
);
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic empty, full;
    logic [$clog2(DEPTH):0] count;
    bs_fifo #(.WIDTH($bits(res_t)), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (in_valid && (in_res.in_port == PORT_W'(p))),
      .din  (in_res),
      .full,
      .pop  (act_pop[p]),
      .dout (act[p]),
      .empty,
      .count
    );
    assign act_valid[p] = !empty;
  end
endmodule
