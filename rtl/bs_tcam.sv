// Ternary content-addressable memory built from registers.
//
// ENTRIES entries, each a value, a care-mask (1 = compare this bit) and a
// valid bit. A search compares the key against all entries in parallel; the
// match vector is registered, then a priority encoder picks the lowest
// matching index and registers it, so hit/idx appear LAT = 2 cycles after
// search_en. The index is meant to address the action RAM, as in a switch's
// TCAM + RAM flow table. Writes take effect one cycle after wr_en and do not
// disturb a lookup already in flight (its match vector is already latched).
// The lowest-index priority rule and the two-cycle latency are this design's
// choices.
module bs_tcam #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned KEY_W   = 224,
  localparam int unsigned AW     = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [KEY_W-1:0] wr_value,
  input  logic [KEY_W-1:0] wr_mask,
  input  logic             wr_valid,
  input  logic             search_en,
  input  logic [KEY_W-1:0] search_key,
  output logic             hit,
  output logic [AW-1:0]    idx
);
  logic [KEY_W-1:0]   value_q [ENTRIES];
  logic [KEY_W-1:0]   mask_q  [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [ENTRIES-1:0] match_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_addr] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value_q[wr_addr] <= wr_value & wr_mask;
      mask_q[wr_addr]  <= wr_mask;
    end
  end

  // Stage 1: parallel compare.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) match_q <= '0;
    else begin
      for (int e = 0; e < ENTRIES; e++)
        match_q[e] <= search_en && valid_q[e] &&
                      ((search_key & mask_q[e]) == value_q[e]);
    end
  end

  // Stage 2: priority encode, lowest index first.
  logic          enc_hit;
  logic [AW-1:0] enc_idx;
  always_comb begin
    enc_hit = 1'b0;
    enc_idx = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (match_q[e]) begin
        enc_hit = 1'b1;
        enc_idx = AW'(e);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit <= 1'b0;
      idx <= '0;
    end else begin
      hit <= enc_hit;
      idx <= enc_idx;
    end
  end
endmodule
