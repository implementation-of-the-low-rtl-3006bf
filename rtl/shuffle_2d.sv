// shuffle_2d: two-stage random-like permutation network for the H3
// sub-matrix (the "2-D" network), with its forward and backward paths.
//
// The k*k messages from PE(x,y) form a k x k array r[x][y]. Forward path:
//   intra-row stage    : row x is rotated by one place when Sr[x] = 1
//                        (C[x][y] = r[x][y+1 mod k]), else passed unchanged;
//   intra-column stage : column y is rotated by one place when Sc[y] = 1
//                        (V[x][y] = C[x+1 mod k][y]), else passed unchanged.
// Row x of V then feeds check node unit x of the H3 check-node block.
// The backward path applies the exact inverse (columns first, then rows)
// with the same controls, returning each check message to the element that
// sent the matching variable message. The two-stage, one-control-bit-per-
// row/column structure follows the design; the choice of a one-place
// rotation as the "shuffled" state of each stage is this design's own.
//
// Combinational; used in the middle stage of the check-node pipeline.
module shuffle_2d #(
  parameter int unsigned K = 6
) (
  input  logic [K-1:0]        sr,      // intra-row controls (ROM1)
  input  logic [K-1:0]        sc,      // intra-column controls (ROM2)
  input  logic [K-1:0][K-1:0] fwd_in,  // [x][y] from PE(x,y)
  output logic [K-1:0][K-1:0] fwd_out, // [x][y]: row x goes to CNU x
  input  logic [K-1:0][K-1:0] bwd_in,  // [x][y] from CNU x, edge y
  output logic [K-1:0][K-1:0] bwd_out  // [x][y] back to PE(x,y)
);

  logic [K-1:0][K-1:0] fc, bc;

  always_comb begin
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        fc[x][y] = sr[x] ? fwd_in[x][(y + 1) % K] : fwd_in[x][y];
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        fwd_out[x][y] = sc[y] ? fc[(x + 1) % K][y] : fc[x][y];
  end

  always_comb begin
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        bc[x][y] = sc[y] ? bwd_in[(x + K - 1) % K][y] : bwd_in[x][y];
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        bwd_out[x][y] = sr[x] ? bc[x][(y + K - 1) % K] : bc[x][y];
  end

endmodule
