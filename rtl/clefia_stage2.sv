// clefia_stage2: second pipeline stage of the Type-II CLEFIA core.
//
// The pipeline register at the block-RAM outputs captures the four T-box
// words of a step together with the partner word it updates (en = 1).  In the
// next cycle the XOR tree adds them: bytes 0 and 1 use their T-box words
// directly, bytes 2 and 3 the same tables rotated by 16 bits, which is free
// wiring.  In the first and last rounds the whitening key is added as well
// (wk_en).  The result is the new value of the partner branch.
//
// Timing: inputs ending in _d are registered; wk and wk_en belong to the
// cycle after en (they come from a synchronous key memory), and result is
// combinational from the register and wk.
module clefia_stage2
  import clefia_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t t0_d,       // table 0, byte 0
  input  word_t t1_d,       // table 1, byte 1
  input  word_t t2_d,       // table 0, byte 2 (not yet rotated)
  input  word_t t3_d,       // table 1, byte 3 (not yet rotated)
  input  word_t partner_d,
  input  word_t wk,
  input  logic  wk_en,
  output word_t result
);

  word_t t0_q, t1_q, t2_q, t3_q, partner_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0_q      <= '0;
      t1_q      <= '0;
      t2_q      <= '0;
      t3_q      <= '0;
      partner_q <= '0;
    end else if (en) begin
      t0_q      <= t0_d;
      t1_q      <= t1_d;
      t2_q      <= t2_d;
      t3_q      <= t3_d;
      partner_q <= partner_d;
    end
  end

  always_comb begin
    result = t0_q ^ t1_q ^ rot16(t2_q) ^ rot16(t3_q) ^ partner_q;
    if (wk_en) result ^= wk;
  end

endmodule
