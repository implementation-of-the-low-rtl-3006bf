// addr_gen: address generator of one extrinsic memory (AG1, AG2 or AG3).
//
// A modulo-L binary counter. In the first read cycle of a phase (`start`)
// it puts out `init_val` and then counts up by one per read cycle, wrapping
// from L-1 to 0, so the L reads of a phase visit every address once,
// beginning at the phase's start offset. The write address is the read
// address delayed by the two pipeline stages between read and write, so the
// result of a read-modify-write goes back to the address it came from.
//
// Timing: rd_addr is valid in the read cycle; wr_addr is valid two cycles
// later, in the write cycle of the same item.
module addr_gen #(
  parameter int unsigned L  = 256,
  parameter int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,     // first read of a phase: load init_val
  input  logic          en,        // read cycle: advance the counter
  input  logic [AW-1:0] init_val,  // start offset of this phase (< L)
  output logic [AW-1:0] rd_addr,
  output logic [AW-1:0] wr_addr
);

  logic [AW-1:0] cnt, d1;

  assign rd_addr = start ? init_val : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      d1      <= '0;
      wr_addr <= '0;
    end else begin
      if (en) cnt <= (rd_addr == AW'(L - 1)) ? '0 : rd_addr + AW'(1);
      d1      <= rd_addr;
      wr_addr <= d1;
    end
  end

endmodule
