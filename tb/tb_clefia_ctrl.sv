// tb_clefia_ctrl: checks the Type-II schedule produced by the controller.
//
// The controller is run alone, for every key size and both directions, with
// blocks issued back to back.  The testbench executes the control words it
// emits on a plain software model of the four branch registers: at each
// stage-2 step, register tgt_slot ^= F_fsel(RK[rk_addr], register in_slot)
// (^ WK[wk_addr] when wk_en), and at the last step the block is read out in
// the order given by the step's offset.  The result must equal the reference
// cipher, so every choice of F-function, key address, register index and
// whitening key is checked by what it computes.  Also checked: the F input
// of step n is the register written by step n-2 (what the datapath forwards),
// the key address is issued one cycle ahead, stage 1/2 follow the address
// cycle by one/two cycles, blocks start every 2r cycles, and in_ready drops
// for one cycle after a configuration write.
module tb_clefia_ctrl;
  import clefia_pkg::*;
  import clefia_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0, cfg_dec = 1'b0, key_we = 1'b0, in_valid = 1'b0;
  keysize_e cfg_ks = KEY128;
  logic in_ready, idle, cfg_dec_q, a_go, a_step0, a_step1, s1_valid, s2_valid;
  keysize_e cfg_ks_q;
  step_info_t a_info, s1_info, s2_info;
  key_addr_t rk_rd_addr;

  int checks = 0, failures = 0;

  clefia_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  wk_arr_t wk;
  rk_arr_t rk;
  int      r;
  block_t  blocks [$];
  word_t   regs [4];
  int      s2_count = 0;
  int      n_blocks_done = 0;
  key_addr_t prev_rk_addr;
  logic    prev_valid = 1'b0, prev_go = 1'b0;
  logic [1:0] tgt_hist [2];
  int      a_count = 0;
  longint  cyc = 0, last_start = -1;
  logic    checking = 1'b0;

  // sample the outputs in the middle of each cycle
  always @(negedge clk) if (rst_n && checking) begin
    cyc++;
    // key lookahead: last cycle's address is this step's round key
    if (prev_valid && a_go) chk("rk lookahead", prev_rk_addr == a_info.rk_addr);
    prev_rk_addr = rk_rd_addr;
    prev_valid = 1'b1;
    chk("stage 1 follows", s1_valid == prev_go);
    prev_go = a_go;
    if (a_go) begin
      if (a_step0) begin
        if (last_start >= 0 && blocks.size() > 1)
          chk($sformatf("issue interval %0d", cyc - last_start), cyc - last_start == 2 * r);
        last_start = cyc;
        a_count = 0;
      end
      chk("step0/1 flags", a_step0 == (a_count == 0) && a_step1 == (a_count == 1));
      if (a_count >= 2) chk("forwarded F input", a_info.in_slot == tgt_hist[0]);
      tgt_hist[0] = tgt_hist[1];
      tgt_hist[1] = a_info.tgt_slot;
      a_count++;
    end
    if (s2_valid) begin
      word_t f;
      if (s2_count % (2 * r) == 0) begin
        block_t b;
        b = blocks[0];
        for (int i = 0; i < 4; i++) regs[i] = b[127-32*i -: 32];
      end
      f = ref_f(s2_info.fsel, rk[int'(s2_info.rk_addr) - RK_BASE], regs[s2_info.in_slot]);
      if (s2_info.wk_en) f ^= wk[int'(s2_info.wk_addr) - WK_BASE];
      regs[s2_info.tgt_slot] ^= f;
      s2_count++;
      chk("last flag", s2_info.last == (s2_count % (2 * r) == 0));
      chk("penult flag", s2_info.penult == (s2_count % (2 * r) == 2 * r - 1));
      if (s2_info.last) begin
        block_t got, e;
        for (int j = 0; j < 4; j++) got[127-32*j -: 32] = regs[2'(j) + s2_info.off];
        e = cfg_dec_q ? ref_decrypt(wk, rk, r, blocks[0]) : ref_encrypt(wk, rk, r, blocks[0]);
        chk($sformatf("schedule result %h exp %h", got, e), got == e);
        void'(blocks.pop_front());
        n_blocks_done++;
      end
    end
  end

  initial begin
    keysize_e kss [3] = '{KEY128, KEY192, KEY256};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      for (int d = 0; d < 2; d++) begin
        ref_keysched(kss[s], {$urandom, $urandom, $urandom, $urandom,
                              $urandom, $urandom, $urandom, $urandom}, wk, rk, r);
        @(negedge clk);
        cfg_we = 1'b1; cfg_dec = d[0]; cfg_ks = kss[s];
        @(negedge clk);
        cfg_we = 1'b0;
        chk("in_ready low after cfg write", !in_ready);
        checking = 1'b1;
        prev_valid = 1'b0;
        last_start = -1;
        s2_count = 0;
        // three blocks back to back
        for (int b = 0; b < 3; b++) begin
          blocks.push_back({$urandom, $urandom, $urandom, $urandom});
          in_valid = 1'b1;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1;
        end
        in_valid = 1'b0;
        while (!idle || blocks.size() > 0) @(negedge clk);
        checking = 1'b0;
      end
    end
    chk("all blocks done", n_blocks_done == 18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
