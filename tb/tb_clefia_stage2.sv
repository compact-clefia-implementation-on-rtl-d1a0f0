// tb_clefia_stage2: checks the pipeline register and XOR tree.
//
// Random T-box words, partner words and whitening keys are applied with en
// high or low; one cycle after an enabled capture the result must equal
// t0 ^ t1 ^ rot16(t2) ^ rot16(t3) ^ partner (^ wk when wk_en), computed here
// byte by byte; with en low the previous capture must be held.
module tb_clefia_stage2;
  import clefia_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, wk_en = 1'b0;
  word_t t0 = '0, t1 = '0, t2 = '0, t3 = '0, pd = '0, wk = '0, res;
  word_t m0, m1, m2, m3, mp;
  int checks = 0, failures = 0;

  clefia_stage2 dut (.clk, .rst_n, .en, .t0_d(t0), .t1_d(t1), .t2_d(t2), .t3_d(t3),
                     .partner_d(pd), .wk, .wk_en, .result(res));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_res(word_t a, word_t b, word_t c, word_t d,
                                       word_t p, word_t k, logic ke);
    byte_t y [4];
    // byte i of rot16(w) is byte (i+2) mod 4 of w
    for (int i = 0; i < 4; i++)
      y[i] = a[31-8*i -: 8] ^ b[31-8*i -: 8] ^ c[31-8*((i+2)%4) -: 8] ^
             d[31-8*((i+2)%4) -: 8] ^ p[31-8*i -: 8] ^ (ke ? k[31-8*i -: 8] : 8'h00);
    return {y[0], y[1], y[2], y[3]};
  endfunction

  initial begin
    m0 = 0; m1 = 0; m2 = 0; m3 = 0; mp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      t0 = $urandom; t1 = $urandom; t2 = $urandom; t3 = $urandom; pd = $urandom;
      @(posedge clk);
      if (en) begin
        m0 = t0; m1 = t1; m2 = t2; m3 = t3; mp = pd;
      end
      #1;
      wk = $urandom;
      wk_en = $urandom_range(0, 1);
      #1;
      chk(res == expect_res(m0, m1, m2, m3, mp, wk, wk_en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t", $time);
    end
  endtask
endmodule
