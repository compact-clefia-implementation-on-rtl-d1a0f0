// clefia_key_ram: expanded-key memory of the CLEFIA core.
//
// The key schedule is run by the host, which writes the four whitening keys
// (addresses 0..3) and the 2r round keys (address 4+i holds RK_i) through
// port A before it sends data.  During ciphering port A reads one round key
// per cycle and port B reads a whitening key, so one dual-port block RAM
// serves the whole key path.  DEPTH 64 holds the 56 words of a 256-bit key.
//
// Timing: synchronous write and read on port A (read returns the old
// contents when the same address is written), synchronous read on port B;
// read data appear one cycle after the address.
module clefia_key_ram
  import clefia_pkg::*;
#(
  parameter int unsigned ADDR_W = KEY_ADDR_W
) (
  input  logic              clk,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  word_t             wdata_a,
  output word_t             q_a,
  input  logic [ADDR_W-1:0] addr_b,
  output word_t             q_b
);

  word_t mem [1 << ADDR_W];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    q_a <= mem[addr_a];
    q_b <= mem[addr_b];
  end

endmodule
