// Self-checking test of the header parser: random UDP, TCP, non-IP and
// IPv4-with-options frames of random length are fed beat by beat with idle
// gaps; the header presented one cycle after each frame's last beat must hold
// the fields computed here from the frame bytes.
module tb_bs_header_parser;
  import bs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_hv = 0;
  logic beat_valid = 0, tlast = 0, hdr_valid;
  logic [63:0] tdata = '0;
  hdr_t hdr;
  bs_header_parser #(.PORT_ID(3)) dut (.*);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (hdr_valid) n_hv++;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 100; f++) begin
      byte unsigned fr [];
      int len, kind; key_t k;
      len = $urandom_range(60, 200);
      fr = new[len];
      foreach (fr[i]) fr[i] = 8'($urandom);
      kind = $urandom_range(3);
      fr[12] = (kind == 2) ? 8'h86 : 8'h08; fr[13] = (kind == 2) ? 8'hDD : 8'h00;
      fr[14] = (kind == 3) ? 8'h46 : 8'h45;
      fr[23] = (kind == 0) ? 8'd17 : 8'd6;
      k = '0;
      k.in_port = 3;
      for (int i = 0; i < 6; i++) begin k.eth_dst[47-8*i -: 8] = fr[i]; k.eth_src[47-8*i -: 8] = fr[6+i]; end
      k.eth_type = {fr[12], fr[13]};
      if (kind != 2 && kind != 3) begin
        k.ip_proto = fr[23];
        k.ip_src = {fr[26], fr[27], fr[28], fr[29]};
        k.ip_dst = {fr[30], fr[31], fr[32], fr[33]};
        k.l4_src = {fr[34], fr[35]};
        k.l4_dst = {fr[36], fr[37]};
      end
      for (int b = 0; b * 8 < len; b++) begin
        @(negedge clk);
        beat_valid = 1; tlast = ((b + 1) * 8 >= len);
        for (int l = 0; l < 8; l++) tdata[8*l +: 8] = (b*8 + l < len) ? fr[b*8 + l] : 8'h00;
        checks++;
        if (hdr_valid) begin failures++; $display("FAIL early header"); end
        if (!tlast && $urandom_range(2) == 0) begin
          @(negedge clk); beat_valid = 0;
        end
      end
      @(negedge clk); beat_valid = 0; tlast = 0;
      checks++;
      if (!hdr_valid || hdr.key !== k || hdr.meta.in_port != 3 || hdr.meta.version != 0 ||
          hdr.meta.next_table != 0 || hdr.meta.out_valid || hdr.meta.drop) begin
        failures++; $display("FAIL frame %0d kind %0d: %h vs %h", f, kind, hdr.key, k);
      end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (n_hv != 100) begin failures++; $display("FAIL %0d headers", n_hv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
