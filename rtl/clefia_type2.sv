// clefia_type2: compact CLEFIA block-cipher core (Type-II structure).
//
// CLEFIA is a 128-bit block cipher built on a four-branch generalised Feistel
// network: every round applies F0 to branch 0 and F1 to branch 2 and XORs
// the results into branches 1 and 3.  The Type-II structure keeps a single
// F-function datapath and uses it for F0 and F1 on alternate cycles:
//   * two dual-port 512 x 32 T-box memories (clefia_tbox_bram) give the four
//     byte lookups of one F-function; address bit 8 picks F0 or F1,
//   * a pipeline register at the memory outputs and an XOR tree
//     (clefia_stage2) finish the F-function and the Feistel XOR,
//   * four branch registers (clefia_round_regs) hold the block,
//   * a dual-port key memory (clefia_key_ram) holds the expanded key that
//     the host computes and writes; the key schedule is not done here,
//   * clefia_ctrl runs the schedule: two cycles per round, the F input of a
//     step forwarded from the XOR tree result of the step two cycles before.
// Encryption and decryption with 128/192/256-bit keys (18/22/26 rounds) use
// the same datapath.
//
// Interface:
//   cfg_we/cfg_dec/cfg_ks  set decrypt and key size (only while idle)
//   key_we/key_addr/key_wdata  write the expanded key (only while idle):
//                          address 0..3 = WK0..WK3, 4+i = RK_i
//   in_valid/in_ready/din  start a block, din[127:96] is word 0
//   out_valid/dout         one-cycle pulse with the result block
//   idle                   no block in flight
// Timing: a block accepted in cycle t gives out_valid in cycle t+2r+2; a new
// block can be accepted every 2r cycles (36/44/52 cycles for 128/192/256-bit
// keys), with the next block overlapping the last two steps of the previous.
module clefia_type2
  import clefia_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cfg_we,
  input  logic      cfg_dec,
  input  keysize_e  cfg_ks,
  input  logic      key_we,
  input  key_addr_t key_addr,
  input  word_t     key_wdata,
  input  logic      in_valid,
  output logic      in_ready,
  input  block_t    din,
  output logic      out_valid,
  output block_t    dout,
  output logic      idle
);

  keysize_e   cfg_ks_q;
  logic       a_step0, a_step1, s1_valid, s2_valid;
  step_info_t a_info, s1_info, s2_info;
  key_addr_t  rk_rd_addr;
  logic       key_wr;
  word_t      rk, wk;
  word_t      f_in, f_addr, rd_in, rd_partner, result;
  word_t      tb0_a, tb0_b, tb1_a, tb1_b;
  word_t      words [4];
  word_t      view [4];
  word_t      out_q [4];
  logic       out_valid_q;

  clefia_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_dec    (cfg_dec),
    .cfg_ks     (cfg_ks),
    .key_we     (key_we),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .idle       (idle),
    .cfg_dec_q  (),
    .cfg_ks_q   (cfg_ks_q),
    .a_go       (),
    .a_step0    (a_step0),
    .a_step1    (a_step1),
    .a_info     (a_info),
    .rk_rd_addr (rk_rd_addr),
    .s1_valid   (s1_valid),
    .s1_info    (s1_info),
    .s2_valid   (s2_valid),
    .s2_info    (s2_info)
  );

  // ---- key memory: port A round keys / host writes, port B whitening keys
  assign key_wr = key_we && idle;

  clefia_key_ram u_keys (
    .clk     (clk),
    .we_a    (key_wr),
    .addr_a  (key_wr ? key_addr : rk_rd_addr),
    .wdata_a (key_wdata),
    .q_a     (rk),
    .addr_b  (s1_info.wk_addr),
    .q_b     (wk)
  );

  // ---- address cycle: F input XOR round key
  always_comb begin
    if (a_step0)      f_in = din[127:96];
    else if (a_step1) f_in = rd_in;
    else              f_in = result;
    f_addr = f_in ^ rk;
  end

  // ---- stage 1: T-box lookups (bytes 0/2 in table 0, bytes 1/3 in table 1)
  clefia_tbox_bram #(.TABLE_ID(0)) u_tbox0 (
    .clk    (clk),
    .addr_a ({a_info.fsel, f_addr[31:24]}),
    .addr_b ({a_info.fsel, f_addr[15:8]}),
    .q_a    (tb0_a),
    .q_b    (tb0_b)
  );

  clefia_tbox_bram #(.TABLE_ID(1)) u_tbox1 (
    .clk    (clk),
    .addr_a ({a_info.fsel, f_addr[23:16]}),
    .addr_b ({a_info.fsel, f_addr[7:0]}),
    .q_a    (tb1_a),
    .q_b    (tb1_b)
  );

  // ---- stage 2: pipeline register + XOR tree
  clefia_stage2 u_stage2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (s1_valid),
    .t0_d      (tb0_a),
    .t1_d      (tb1_a),
    .t2_d      (tb0_b),
    .t3_d      (tb1_b),
    .partner_d (rd_partner),
    .wk        (wk),
    .wk_en     (s2_valid && s2_info.wk_en),
    .result    (result)
  );

  // ---- branch registers
  clefia_round_regs u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (a_step0),
    .blk      (din),
    .wr_en    (s2_valid && !s2_info.last),
    .wr_idx   (s2_info.tgt_slot),
    .wr_data  (result),
    .rd_idx_a (a_info.in_slot),
    .rd_a     (rd_in),
    .rd_idx_b (s1_info.tgt_slot),
    .rd_b     (rd_partner),
    .words    (words)
  );

  // ---- output: branches gathered when step 2r-2 finishes, the last word
  // added when step 2r-1 finishes
  always_comb begin
    for (int i = 0; i < 4; i++)
      view[i] = (2'(i) == s2_info.tgt_slot) ? result : words[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) out_q[i] <= '0;
      out_valid_q <= 1'b0;
    end else begin
      out_valid_q <= s2_valid && s2_info.last;
      if (s2_valid && s2_info.penult) begin
        for (int j = 0; j < 4; j++) out_q[j] <= view[2'(j) + s2_info.off];
      end
      if (s2_valid && s2_info.last) begin
        out_q[s2_info.fsel ? 3 : 1] <= result;
      end
    end
  end

  assign out_valid = out_valid_q;
  assign dout      = {out_q[0], out_q[1], out_q[2], out_q[3]};

  // the key schedule fixes 18, 22 or 26 rounds
  assert property (@(posedge clk) disable iff (!rst_n)
                   cfg_ks_q inside {KEY128, KEY192, KEY256});

endmodule
