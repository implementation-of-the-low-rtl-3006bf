// shuffle_rom: control ROM of the random-like shuffle network (ROM1 holds
// the intra-row controls Sr, ROM2 the intra-column controls Sc).
//
// DEPTH words of K bits: one word per check-node cycle, so the permutation
// applied by the network changes every clock but repeats identically in
// every iteration and every frame. The contents are a fixed pseudo-random
// pattern, ldpc_pkg::shuffle_word(ROM_ID, address); the design only fixes
// the size (L x k) and that the pattern is random-like.
//
// Timing: synchronous read, data one cycle after the address, so it lines
// up with the extrinsic-RAM data read at the same cycle index.
module shuffle_rom
  import ldpc_pkg::*;
#(
  parameter int unsigned ROM_ID = 1,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned K      = 6,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [K-1:0]  data
);

  logic [K-1:0] rom [DEPTH];

  always_comb begin
    for (int unsigned a = 0; a < DEPTH; a++) begin
      logic [31:0] w;
      w = shuffle_word(ROM_ID, a);
      rom[a] = w[K-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (re) data <= rom[addr];
  end

endmodule
