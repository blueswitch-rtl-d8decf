// Synchronous first-in first-out buffer with show-ahead output.
//
// DEPTH entries of WIDTH bits (DEPTH a power of two). push when !full, pop
// when !empty; dout is the oldest entry whenever !empty. Used for the header,
// result and output FIFOs of the datapath. Writing when full or reading when
// empty is a protocol error and is checked by assertions.
module bs_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp_q, rp_q;

  assign count = wp_q - rp_q;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (push && !full) wp_q <= wp_q + 1'b1;
      if (pop && !empty) rp_q <= rp_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp_q[AW-1:0]] <= din;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
