// ldpc_ram: simple dual-port memory used for every RAM of a processing
// element: the extrinsic RAMs E1..E3 (L x 1), the working intrinsic RAM
// (L x 8), the input intrinsic RAM (L x 5) and the two decision RAMs (L x 1).
//
// One write port and one read port, both synchronous to clk. A read issued
// in cycle t returns its data in cycle t+1 from a register, as a block RAM
// does. The decoder never reads and writes the same address in one cycle, so
// no read-during-write behaviour is relied on. Contents are not reset.
module ldpc_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 1,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
