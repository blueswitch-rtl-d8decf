// Per-port packet FIFO with frame re-read.
//
// Holds the stream beats (data, keep, last) of arriving frames while their
// headers are looked up. Three pointers: write, read and base. Space is freed
// only up to base, so a frame that has been read can be read again: rewind
// moves the read pointer back to base (start of the current frame), release
// moves base up to the read pointer (frame finished). The marshaller uses this
// to send one copy of a frame per destination port. rd_beat is valid when
// rd_valid; rd_pop advances by one beat. rewind and release are one-cycle
// pulses and take precedence over rd_pop in the same cycle. The re-read
// scheme and the depth of 512 beats are this design's choices.
module bs_pkt_fifo
  import bs_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_valid,
  output logic  wr_ready,
  input  beat_t wr_beat,
  output logic  rd_valid,
  output beat_t rd_beat,
  input  logic  rd_pop,
  input  logic  rewind,
  input  logic  release_i
);
  beat_t mem [DEPTH];
  logic [AW:0] wp_q, rp_q, bp_q, rp_d;

  assign wr_ready = (wp_q - bp_q) != (AW+1)'(DEPTH);
  assign rd_valid = (rp_q != wp_q);
  assign rd_beat  = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
      bp_q <= '0;
    end else begin
      if (wr_valid && wr_ready) wp_q <= wp_q + 1'b1;
      rp_q <= rp_d;
      if (release_i) bp_q <= rp_d;
    end
  end

  always_comb begin
    if (rewind)                  rp_d = bp_q;
    else if (rd_pop && rd_valid) rp_d = rp_q + 1'b1;
    else                         rp_d = rp_q;
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) mem[wp_q[AW-1:0]] <= wr_beat;
  end
endmodule
