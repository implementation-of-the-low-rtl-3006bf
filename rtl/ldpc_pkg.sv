// ldpc_pkg: constants, types and code-construction functions shared by the
// (3,k)-regular partly parallel LDPC decoder.
//
// The code has k*k variable-node groups of L bits each (group PE(x,y),
// x,y = 1..k) and three check sub-matrices H1, H2, H3 of L*k checks each.
// The offsets below define where each processing element starts reading
// its extrinsic memories in check-node mode:
//   H1: offset 0                      (block of identity matrices)
//   H2: offset ((x-1)*y) mod L        (right-cyclic-shifted identities)
//   H3: offset t(x,y) mod L           (random-like sub-matrix)
// The H3 offsets t(x,y) must be distinct along a row and must avoid the H2
// differences along a column so that no 4-cycle appears; this design fixes
// t(x,y) = x*x + x*y + 7*y (mod L), which meets both rules for k=6, L=256.
// The per-cycle control words of the 2-D shuffle network (ROM1 and ROM2)
// are a fixed pseudo-random function of the cycle index, computed here by
// an integer hash so that no table has to be stored in the source.
package ldpc_pkg;

  // Default sizes of the 9216-bit, rate-1/2, (3,6)-regular decoder.
  localparam int unsigned K_DEF        = 6;    // check-node degree k
  localparam int unsigned L_DEF        = 256;  // folding factor / sub-matrix size
  localparam int unsigned MAX_ITER_DEF = 18;   // decoding iterations per frame
  localparam int unsigned LLR_W_DEF    = 5;    // width of channel LLR input
  localparam int unsigned INT_W_DEF    = 8;    // width of stored intrinsic LLR
  localparam int unsigned WEIGHT_DEF   = 4;    // weight W of a 1-bit check message

  // Decoder phase. INIT copies a loaded frame into the working memories,
  // CNP is check-node processing, VNP variable-node processing.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_INIT = 2'd1,
    PH_CNP  = 2'd2,
    PH_VNP  = 2'd3
  } phase_e;

  // Control broadcast from the controller to every processing element.
  typedef struct packed {
    phase_e phase;     // current phase, constant for all L+2 cycles of it
    logic   start;     // first read cycle of the phase: address generators load
    logic   rd_en;     // a read cycle (first L cycles of the phase)
    logic   xfer_out;  // INIT: move working decisions into output buffer
  } pe_ctrl_t;

  // Start address of AG2 in check-node mode: ((x-1)*y) mod L, x,y 1-based.
  function automatic int unsigned h2_offset(int unsigned x, int unsigned y,
                                            int unsigned l);
    return ((x - 1) * y) % l;
  endfunction

  // Start address t(x,y) of AG3 in check-node mode, x,y 1-based.
  function automatic int unsigned h3_offset(int unsigned x, int unsigned y,
                                            int unsigned l);
    return (x * x + x * y + 7 * y) % l;
  endfunction

  // Control word of shuffle ROM rom_id (1: intra-row, 2: intra-column) at
  // cycle index addr. Bit i enables shuffle stage i.
  function automatic logic [31:0] shuffle_word(int unsigned rom_id,
                                               int unsigned addr);
    logic [31:0] v;
    v = addr * 32'h9E37_79B1 + rom_id * 32'h5BD1_E995 + 32'h1234_5677;
    v = v ^ (v >> 15);
    v = v * 32'h2C1B_3C6D;
    v = v ^ (v >> 12);
    v = v * 32'h297A_2D39;
    v = v ^ (v >> 15);
    return v;
  endfunction

endpackage
