// Per-port header parser.
//
// Watches the beats accepted into its port's packet FIFO and keeps the first
// 40 bytes of each frame. One cycle after the frame's last beat it presents
// one header (hdr_valid for a single cycle): the lookup key and metadata with
// the input port filled in and everything else cleared. Byte 0 of the frame
// is tdata[7:0] of the first beat. Extracted fields: destination and source
// MAC, EtherType; for IPv4 without options (EtherType 0x0800, first byte
// 0x45) protocol, source and destination address; for TCP (6) and UDP (17)
// source and destination port. Fields that are absent are zero. Parsing in
// parallel with buffering follows the document; the field set and the byte
// order are this design's choices.
module bs_header_parser
  import bs_pkg::*;
#(
  parameter int unsigned PORT_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              beat_valid,
  input  logic [AXIS_W-1:0] tdata,
  input  logic              tlast,
  output logic              hdr_valid,
  output hdr_t              hdr
);
  localparam int unsigned NB    = 40;
  localparam int unsigned BEATS = NB / KEEP_W;

  logic [7:0] byte_q [NB];
  logic [$clog2(BEATS+1)-1:0] beat_q;
  logic emit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_q <= '0;
      emit_q <= 1'b0;
      for (int k = 0; k < NB; k++) byte_q[k] <= '0;
    end else begin
      emit_q <= beat_valid && tlast;
      if (beat_valid) begin
        for (int b = 0; b < BEATS; b++)
          for (int l = 0; l < KEEP_W; l++)
            if (beat_q == b) byte_q[b*KEEP_W+l] <= tdata[8*l +: 8];
            else if (beat_q == 0 && b > 0) byte_q[b*KEEP_W+l] <= '0;
        if (tlast)                  beat_q <= '0;
        else if (beat_q != BEATS)   beat_q <= beat_q + 1'b1;
      end
    end
  end

  function automatic logic [15:0] be16(int unsigned o);
    return {byte_q[o], byte_q[o+1]};
  endfunction
  function automatic logic [31:0] be32(int unsigned o);
    return {byte_q[o], byte_q[o+1], byte_q[o+2], byte_q[o+3]};
  endfunction

  logic is_ip, is_l4;
  always_comb begin
    is_ip = (be16(12) == 16'h0800) && (byte_q[14] == 8'h45);
    is_l4 = is_ip && (byte_q[23] == 8'd6 || byte_q[23] == 8'd17);
    hdr = '0;
    hdr.meta.in_port  = PORT_W'(PORT_ID);
    hdr.key.in_port   = 8'(PORT_ID);
    hdr.key.eth_dst   = {be32(0), be16(4)};
    hdr.key.eth_src   = {be16(6), be32(8)};
    hdr.key.eth_type  = be16(12);
    if (is_ip) begin
      hdr.key.ip_proto = byte_q[23];
      hdr.key.ip_src   = be32(26);
      hdr.key.ip_dst   = be32(30);
    end
    if (is_l4) begin
      hdr.key.l4_src = be16(34);
      hdr.key.l4_dst = be16(36);
    end
  end
  assign hdr_valid = emit_q;
endmodule
