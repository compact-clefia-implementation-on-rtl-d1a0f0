// clefia_ctrl: scheduler of the Type-II CLEFIA core.
//
// A block of r rounds is processed as 2r half-round steps, one step entering
// the pipeline per cycle.  Step n goes through three cycles:
//   address cycle  n    : F input XOR round key forms the T-box address
//   stage 1        n+1  : T-box lookup (block RAM), partner word fetched
//   stage 2        n+2  : XOR tree, partner register updated
// The F input of step n >= 2 is the stage-2 result of step n-2 in the same
// cycle, so each round takes two cycles and the two stages stay busy with
// alternating F-functions, as in the published Type-II schedule.
// clefia_pkg::step_info() gives the per-step choices; this module counts
// steps, carries each step's control word down the pipeline and produces
// the key-memory read addresses one cycle ahead of their use (synchronous
// key RAM).  Once step 2r-1 has entered, a new block may start in the very
// next cycle, so blocks follow each other every 2r cycles.
//
// Interface: cfg_we loads the configuration (decrypt, key size) and is
// accepted only while idle; in_valid/in_ready start a block (the accepting
// cycle is the address cycle of step 0).  After a configuration or key write
// in_ready stays low for one cycle, so that the round key of step 0 is read
// with the new setting.
module clefia_ctrl
  import clefia_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic       cfg_dec,
  input  keysize_e   cfg_ks,
  input  logic       key_we,      // host key write (accepted only while idle)
  input  logic       in_valid,
  output logic       in_ready,
  output logic       idle,
  output logic       cfg_dec_q,
  output keysize_e   cfg_ks_q,
  // address cycle
  output logic       a_go,
  output logic       a_step0,     // step 0: F input is the new block
  output logic       a_step1,     // step 1: F input read from the registers
  output step_info_t a_info,
  output key_addr_t  rk_rd_addr,  // key RAM port A address (for next cycle)
  // stage 1
  output logic       s1_valid,
  output step_info_t s1_info,
  // stage 2
  output logic       s2_valid,
  output step_info_t s2_info
);

  logic  a_valid_q, dirty_q, start;
  step_t n_q, a_n, next_n;
  logic  a_more;

  assign idle     = !a_valid_q && !s1_valid && !s2_valid;
  assign in_ready = !a_valid_q && !dirty_q && !cfg_we && !key_we;
  assign start    = in_valid && in_ready;
  assign a_go     = a_valid_q || start;
  assign a_n      = a_valid_q ? n_q : '0;
  assign a_step0  = a_go && (a_n == 0);
  assign a_step1  = a_go && (a_n == 1);
  assign a_info   = step_info(a_n, cfg_dec_q, cfg_ks_q);
  assign a_more   = a_go && !a_info.last;
  assign next_n   = a_more ? a_n + 1'b1 : '0;

  // round key of the step in next cycle's address slot (step 0 when idle)
  always_comb begin
    step_info_t nxt;
    nxt        = step_info(next_n, cfg_dec_q, cfg_ks_q);
    rk_rd_addr = nxt.rk_addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid_q <= 1'b0;
      n_q       <= '0;
      dirty_q   <= 1'b0;
      cfg_dec_q <= 1'b0;
      cfg_ks_q  <= KEY128;
      s1_valid  <= 1'b0;
      s1_info   <= '0;
      s2_valid  <= 1'b0;
      s2_info   <= '0;
    end else begin
      a_valid_q <= a_more;
      n_q       <= next_n;
      dirty_q   <= idle && (cfg_we || key_we);
      if (idle && cfg_we) begin
        cfg_dec_q <= cfg_dec;
        cfg_ks_q  <= cfg_ks;
      end
      s1_valid <= a_go;
      if (a_go) s1_info <= a_info;
      s2_valid <= s1_valid;
      if (s1_valid) s2_info <= s1_info;
    end
  end

  // configuration and keys may only change while no block is in flight
  assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> idle);
  assert property (@(posedge clk) disable iff (!rst_n) key_we |-> idle);
  // steps enter in order: a running block is followed by its next step
  assert property (@(posedge clk) disable iff (!rst_n)
                   a_valid_q && !a_info.last |=> a_valid_q && (n_q == $past(n_q) + 1'b1));

endmodule
