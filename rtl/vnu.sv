// vnu: variable node unit of the reduced-complexity decoder (column weight 3).
//
// Each incoming 1-bit check message cv[i] is turned into a signed weight
// Y(i) = +W when the bit is 0 and -W when it is 1. From the stored LLR Ln:
//   outgoing message i : vc[i]   = sign(Ln + sum of Y(j), j != i)
//   updated LLR        : llr_out = Ln + Y(1) + Y(2) + Y(3)
//   hard decision      : dec     = sign(llr_out)   (1 means bit value 1)
// The sums share six adders: s1 = Ln+Y1, s23 = Y2+Y3, then Ln+s23, s1+Y3,
// s1+Y2 and s1+s23, following the adder arrangement of the design.
// All values are two's complement. Sums are formed two bits wider than
// INT_W so that the signs sent to the check nodes are exact; the updated LLR
// is then saturated to INT_W bits before it is stored (saturation is this
// design's choice, the accumulated LLR would otherwise wrap and flip sign).
//
// Initialisation also passes through this unit: with `init` high all three
// weights are zero, so the channel LLR (sign-extended by the caller) comes
// out unchanged and its sign is sent on all three edges, VC = MSB(Ln).
//
// Interface: combinational, used in the "modify" stage of the three-stage
// pipeline (INIT and variable-node phases). `sat` flags that llr_out was
// clipped.
module vnu #(
  parameter int unsigned INT_W  = 8,
  parameter int unsigned WEIGHT = 4
) (
  input  logic                    init,
  input  logic signed [INT_W-1:0] llr_in,
  input  logic        [2:0]       cv,
  output logic signed [INT_W-1:0] llr_out,
  output logic        [2:0]       vc,
  output logic                    dec,
  output logic                    sat
);

  localparam int unsigned SW = INT_W + 2;
  localparam logic signed [SW-1:0] W    = SW'(WEIGHT);
  localparam logic signed [SW-1:0] LMAX = SW'((1 << (INT_W - 1)) - 1);
  localparam logic signed [SW-1:0] LMIN = -LMAX - SW'(1);

  logic signed [SW-1:0] y1, y2, y3, ln, s1, s23, c1, c2, c3, tot;

  always_comb begin
    ln  = SW'(llr_in);
    y1  = init ? '0 : cv[0] ? -W : W;
    y2  = init ? '0 : cv[1] ? -W : W;
    y3  = init ? '0 : cv[2] ? -W : W;
    s1  = ln + y1;
    s23 = y2 + y3;
    c1  = ln + s23;
    c2  = s1 + y3;
    c3  = s1 + y2;
    tot = s1 + s23;
    vc  = {c3[SW-1], c2[SW-1], c1[SW-1]};
    sat = (tot > LMAX) || (tot < LMIN);
    if (tot > LMAX)      llr_out = LMAX[INT_W-1:0];
    else if (tot < LMIN) llr_out = LMIN[INT_W-1:0];
    else                 llr_out = tot[INT_W-1:0];
    dec = llr_out[INT_W-1];
  end

endmodule
