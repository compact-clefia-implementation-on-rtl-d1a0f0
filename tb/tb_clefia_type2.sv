// tb_clefia_type2: end-to-end test of the Type-II CLEFIA core at its
// default size.
//
// For each key size (128, 192, 256 bits) the testbench runs the key
// schedule in clefia_ref_pkg, writes the expanded key into the core, then:
//   * encrypts the CLEFIA test plaintext and compares with the known-answer
//     ciphertext and with the reference model,
//   * decrypts that ciphertext back,
//   * streams random blocks back to back in both directions and compares
//     every result with the reference model.
// It checks the latency (2r+2 cycles from acceptance to out_valid) and the
// issue interval (2r cycles between accepted blocks when in_valid stays
// high), and counts the mechanisms the core has: back-to-back overlap of two
// blocks, decryption, mode switch, key-size switch and the stall of in_ready
// after a configuration write.  A mechanism never seen counts as a failure.
module tb_clefia_type2;
  import clefia_pkg::*;
  import clefia_ref_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      cfg_we = 1'b0, cfg_dec = 1'b0;
  keysize_e  cfg_ks = KEY128;
  logic      key_we = 1'b0;
  key_addr_t key_addr = '0;
  word_t     key_wdata = '0;
  logic      in_valid = 1'b0, in_ready;
  block_t    din = '0;
  logic      out_valid, idle;
  block_t    dout;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_dec = 0, n_mode_switch = 0, n_ks_switch = 0, n_cfg_stall = 0;
  longint cyc = 0;

  clefia_type2 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in order
  block_t exp_q [$];
  longint acc_q [$];
  int     cur_r = 18;
  longint last_acc = -1;
  logic   last_dec = 1'b0;
  keysize_e last_ks = KEY128;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // output monitor: value, order and latency
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) check("unexpected output", 1'b0);
      else begin
        block_t e;
        longint a;
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        check($sformatf("result %h exp %h", dout, e), dout === e);
        check($sformatf("latency %0d", cyc - a), cyc - a == 2 * cur_r + 2);
      end
    end
  end

  task automatic configure(logic dec, keysize_e ks);
    @(negedge clk);
    if (dec != last_dec) n_mode_switch++;
    if (ks != last_ks) n_ks_switch++;
    last_dec = dec;
    last_ks  = ks;
    cfg_we = 1'b1; cfg_dec = dec; cfg_ks = ks;
    @(negedge clk);
    cfg_we = 1'b0;
    // in_ready must stay low for one cycle after the write
    if (!in_ready) n_cfg_stall++;
    check("stall after cfg write", !in_ready);
    cur_r = rounds_of(ks);
  endtask

  task automatic load_key(const ref wk_arr_t wk, const ref rk_arr_t rk, int r);
    for (int i = 0; i < 4 + 2 * r; i++) begin
      @(negedge clk);
      key_we = 1'b1;
      key_addr = key_addr_t'(i);
      key_wdata = (i < 4) ? wk[i] : rk[i-4];
    end
    @(negedge clk);
    key_we = 1'b0;
  endtask

  // send a block; returns when accepted
  task automatic send(block_t b, block_t e);
    @(negedge clk);
    in_valid = 1'b1;
    din = b;
    while (!in_ready) @(negedge clk);
    // accepted at the next posedge
    if (!idle) n_overlap++;
    if (cfg_dec) n_dec++;
    if (last_acc >= 0 && exp_q.size() > 0)
      check($sformatf("issue interval %0d", cyc + 1 - last_acc - 0),
            (cyc - last_acc) == 2 * cur_r);
    exp_q.push_back(e);
    acc_q.push_back(cyc);
    last_acc = cyc;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic drain();
    while (exp_q.size() > 0) @(posedge clk);
    @(negedge clk);
    last_acc = -1;
  endtask

  logic [255:0] kat_key = 256'hffeeddcc_bbaa9988_77665544_33221100_f0e0d0c0_b0a09080_70605040_30201000;
  block_t kat_pt = 128'h00010203_04050607_08090a0b_0c0d0e0f;
  block_t kat_ct [3] = '{128'hde2bf2fd_9b74aacd_f1298555_459494fd,
                         128'he2482f64_9f028dc4_80dda184_fde181ad,
                         128'ha1397814_289de80c_10da46d1_fa48b38a};

  initial begin
    wk_arr_t wk;
    rk_arr_t rk;
    int      r;
    block_t  pt [8];
    keysize_e kss [3] = '{KEY128, KEY192, KEY256};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++) begin
      logic [255:0] key;
      key = (s == 0) ? {kat_key[255:128], 128'h0} :
            (s == 1) ? {kat_key[255:64], 64'h0} : kat_key;
      ref_keysched(kss[s], key, wk, rk, r);
      check("reference matches test vector", ref_encrypt(wk, rk, r, kat_pt) == kat_ct[s]);
      load_key(wk, rk, r);
      // known answer, encrypt then decrypt
      configure(1'b0, kss[s]);
      send(kat_pt, kat_ct[s]);
      drain();
      configure(1'b1, kss[s]);
      send(kat_ct[s], kat_pt);
      drain();
      // random streams, back to back
      for (int d = 0; d < 2; d++) begin
        configure(d[0], kss[s]);
        for (int i = 0; i < 8; i++) begin
          pt[i] = {$urandom, $urandom, $urandom, $urandom};
          send(pt[i], d ? ref_decrypt(wk, rk, r, pt[i]) : ref_encrypt(wk, rk, r, pt[i]));
        end
        drain();
      end
      // a fresh random key of this size
      key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ref_keysched(kss[s], key, wk, rk, r);
      load_key(wk, rk, r);
      configure(1'b0, kss[s]);
      for (int i = 0; i < 4; i++) begin
        pt[i] = {$urandom, $urandom, $urandom, $urandom};
        send(pt[i], ref_encrypt(wk, rk, r, pt[i]));
      end
      drain();
    end
    repeat (5) @(posedge clk);
    check("no outputs missing", exp_q.size() == 0);
    $display("mechanisms: overlap=%0d decrypt=%0d mode_switch=%0d keysize_switch=%0d cfg_stall=%0d",
             n_overlap, n_dec, n_mode_switch, n_ks_switch, n_cfg_stall);
    check("back-to-back overlap seen", n_overlap > 0);
    check("decryption seen", n_dec > 0);
    check("mode switch seen", n_mode_switch > 0);
    check("key-size switch seen", n_ks_switch > 0);
    check("cfg stall seen", n_cfg_stall > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
