// cnu: check node unit of the reduced-complexity decoder.
//
// Every message in this decoder is one bit (the sign of a variable-to-check
// message), so a check node only has to return, on each edge, the XOR of the
// bits on all its other edges. The unit is built as the 3k-6 gate
// structure of the design: a forward XOR chain f(i) = v(1)^...^v(i), a
// backward chain b(i) = v(i)^...^v(k), and out(i) = f(i-1) ^ b(i+1), with the
// two end outputs taken straight from the chains (12 XOR gates for k = 6).
//
// Interface: vc_in[i] is the bit from the i-th connected variable node,
// cv_out[i] the bit returned to it. Purely combinational; it sits in the
// middle stage of the three-stage check-node pipeline.
module cnu #(
  parameter int unsigned K = 6
) (
  input  logic [K-1:0] vc_in,
  output logic [K-1:0] cv_out
);

  logic [K-1:0] fwd;  // fwd[i] = vc_in[0] ^ ... ^ vc_in[i]
  logic [K-1:0] bwd;  // bwd[i] = vc_in[i] ^ ... ^ vc_in[K-1]

  for (genvar i = 0; i < K; i++) begin : g_chain
    if (i == 0) begin : g_f0
      assign fwd[i] = vc_in[i];
    end else begin : g_fi
      assign fwd[i] = fwd[i-1] ^ vc_in[i];
    end
    if (i == K - 1) begin : g_bl
      assign bwd[i] = vc_in[i];
    end else begin : g_bi
      assign bwd[i] = bwd[i+1] ^ vc_in[i];
    end
  end

  always_comb begin
    cv_out[0]   = bwd[1];
    cv_out[K-1] = fwd[K-2];
    for (int i = 1; i < K - 1; i++) cv_out[i] = fwd[i-1] ^ bwd[i+1];
  end

endmodule
