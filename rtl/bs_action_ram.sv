// Action RAM of one flow-table bank: one action word per TCAM entry.
//
// Simple dual-port RAM, one write port for configuration and one synchronous
// read port addressed by the TCAM's match index; rdata is valid one cycle
// after re. The contents are reset to zero (no action) so that a lookup of an
// entry never written reads a defined value. Read latency of one cycle is
// this design's choice.
module bs_action_ram #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned W       = 15,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) mem[e] <= '0;
      rdata <= '0;
    end else begin
      if (we) mem[waddr] <= wdata;
      if (re) rdata <= mem[raddr];
    end
  end
endmodule
