// clefia_round_regs: the four 32-bit branch registers of the Type-II core.
//
// They hold the four Feistel branches of the block in flight.  Words never
// move between registers: each half-round step updates one register in
// place (write port), the rotation of the Feistel network is tracked by the
// controller as an index offset.  A new block is loaded whole (load, word 0
// from blk[127:96]); a load wins over a step write in the same cycle, which
// lets the next block enter while the last step of the previous one drains.
// Two combinational read ports serve the F-input of step 1 and the partner
// word that the next step XORs into.
//
// Timing: writes and loads take effect at the clock edge; reads are
// combinational.  Reset clears the registers.
module clefia_round_regs
  import clefia_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  block_t     blk,
  input  logic       wr_en,
  input  logic [1:0] wr_idx,
  input  word_t      wr_data,
  input  logic [1:0] rd_idx_a,
  output word_t      rd_a,
  input  logic [1:0] rd_idx_b,
  output word_t      rd_b,
  output word_t      words [4]
);

  word_t r [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 4; i++) r[i] <= blk[127-32*i -: 32];
    end else if (wr_en) begin
      r[wr_idx] <= wr_data;
    end
  end

  assign rd_a  = r[rd_idx_a];
  assign rd_b  = r[rd_idx_b];
  assign words = r;

endmodule
