// cnpe: check node processing element: k check node units plus the shuffle
// network that ties them to the k*k processing elements, for one of the
// three check sub-matrices (G = 1, 2 or 3).
//
//   G = 1 (H1, fixed): CNU x takes the bits of PE(x,1..k)  (same x index)
//   G = 2 (H2, fixed): CNU y takes the bits of PE(1..k,y)  (same y index)
//   G = 3 (H3, random-like): bits pass the 2-D shuffle network, CNU x takes
//          row x of its output, and results come back through the inverse
//          network. Its controls come from ROM1/ROM2, addressed by the
//          cycle index of the check-node phase.
// The fixed networks are plain wiring. Each CNU returns the XOR of its
// other inputs on every edge.
//
// Timing: vc_in is the extrinsic-RAM data of the current cycle; cv_out is
// combinational from it (shuffle, CNU and unshuffle share one pipeline
// stage). rom_addr/rom_re are given in the read cycle, one cycle earlier, so
// the ROM words arrive together with vc_in. For G = 1 and 2 the ROM ports
// are not used.
module cnpe #(
  parameter int unsigned G  = 1,
  parameter int unsigned K  = 6,
  parameter int unsigned L  = 256,
  parameter int unsigned AW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                clk,
  input  logic                rom_re,
  input  logic [AW-1:0]       rom_addr,
  input  logic [K-1:0][K-1:0] vc_in,   // [x][y] from PE(x,y)
  output logic [K-1:0][K-1:0] cv_out   // [x][y] to PE(x,y)
);

  logic [K-1:0][K-1:0] cnu_in, cnu_out;

  for (genvar i = 0; i < K; i++) begin : g_cnu
    cnu #(.K(K)) u_cnu (.vc_in(cnu_in[i]), .cv_out(cnu_out[i]));
  end

  if (G == 3) begin : g_pi3
    logic [K-1:0] sr, sc;
    shuffle_rom #(.ROM_ID(1), .DEPTH(L), .K(K)) u_rom1 (
      .clk, .re(rom_re), .addr(rom_addr), .data(sr));
    shuffle_rom #(.ROM_ID(2), .DEPTH(L), .K(K)) u_rom2 (
      .clk, .re(rom_re), .addr(rom_addr), .data(sc));
    shuffle_2d #(.K(K)) u_net (
      .sr, .sc, .fwd_in(vc_in), .fwd_out(cnu_in),
      .bwd_in(cnu_out), .bwd_out(cv_out));
  end else if (G == 2) begin : g_pi2
    always_comb
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) begin
          cnu_in[y][x] = vc_in[x][y];
          cv_out[x][y] = cnu_out[y][x];
        end
  end else begin : g_pi1
    assign cnu_in = vc_in;
    assign cv_out = cnu_out;
  end

endmodule
