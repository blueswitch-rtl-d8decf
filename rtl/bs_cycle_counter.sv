// Free-running cycle counter.
//
// Counts clock cycles from reset; software reads it through the register
// interface to time reconfigurations. Wraps after 2^W cycles. The counter is
// described in the document; the width is this design's choice.
module bs_cycle_counter #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + W'(1);
  end
endmodule
