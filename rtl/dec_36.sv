// dec_36: partly parallel decoder for a (3,k)-regular LDPC code of length
// L*k*k (default: k = 6, L = 256, a 9216-bit rate-1/2 code), using the
// reduced-complexity message passing algorithm: 1-bit messages on every
// edge, XOR check nodes and soft (LLR-accumulating) variable nodes.
//
// Structure: k*k processing elements PE(x,y), each serving L variable nodes,
// and three check node processing elements, one per check sub-matrix:
// CNPE1 (H1, blocks of identities), CNPE2 (H2, cyclically shifted
// identities) and CNPE3 (H3, random-like, through a 2-D shuffle network).
// Each PE sends bit i of its extrinsic messages to CNPE i and takes the
// answer back in the same cycle. A dec_ctrl sequencer runs the phases
// INIT (L+2 cycles), then MAX_ITER times CNP and VNP (L+2 cycles each).
//
// Ports (as on the decoder's pin-out): clk, din (5-bit LLR, two's
// complement, positive means bit 0), load (output: din is taken at the next
// rising edge while it is high), dout and dataout_ready (one decided bit per
// cycle while dataout_ready is high). rst_n, an asynchronous active-low
// reset, is this implementation's addition. Symbol s of a frame belongs to
// PE number s mod k*k (PE(x,y) is number (y-1)*k + (x-1)) at local address
// s div k*k; decisions come out in the same order.
// Timing per frame: L*k*k load cycles (overlapped with the previous frame's
// decoding), L+2 INIT cycles, 2*(L+2)*MAX_ITER decoding cycles.
module dec_36
  import ldpc_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned L        = L_DEF,
  parameter int unsigned MAX_ITER = MAX_ITER_DEF,
  parameter int unsigned LLR_W    = LLR_W_DEF,
  parameter int unsigned INT_W    = INT_W_DEF,
  parameter int unsigned WEIGHT   = WEIGHT_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LLR_W-1:0] din,
  output logic             load,
  output logic             dout,
  output logic             dataout_ready
);

  localparam int unsigned AW  = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned NPE = K * K;
  localparam int unsigned CW  = $clog2(NPE);
  localparam int unsigned IW  = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1;

  pe_ctrl_t      ctrl;
  logic [AW-1:0] cycle;
  logic [IW-1:0] iter;
  logic [CW-1:0] ld_pe, out_pe;
  logic [AW-1:0] ld_addr, out_addr;
  logic          out_re;

  dec_ctrl #(.K(K), .L(L), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .ctrl, .cycle, .iter,
    .load, .ld_pe, .ld_addr,
    .out_re, .out_pe, .out_addr);

  // Messages arranged [x-1][y-1], one array per check sub-matrix.
  logic [2:0][K-1:0][K-1:0] vc, cv;
  logic [NPE-1:0]           pe_out, pe_sat;

  for (genvar gx = 0; gx < K; gx++) begin : g_x
    for (genvar gy = 0; gy < K; gy++) begin : g_y
      localparam int unsigned C = gy * K + gx;
      logic [2:0] vc_b, cv_b;
      pe #(.L(L), .X(gx + 1), .Y(gy + 1), .LLR_W(LLR_W),
           .INT_W(INT_W), .WEIGHT(WEIGHT)) u_pe (
        .clk, .rst_n, .ctrl,
        .ld_we(load && ld_pe == CW'(C)), .ld_addr, .ld_data(din),
        .out_re, .out_addr, .out_bit(pe_out[C]),
        .vc_out(vc_b), .cv_in(cv_b), .sat_evt(pe_sat[C]));
      for (genvar g = 0; g < 3; g++) begin : g_link
        assign vc[g][gx][gy] = vc_b[g];
        assign cv_b[g]       = cv[g][gx][gy];
      end
    end
  end

  for (genvar g = 0; g < 3; g++) begin : g_cnpe
    cnpe #(.G(g + 1), .K(K), .L(L)) u_cnpe (
      .clk, .rom_re(ctrl.rd_en && ctrl.phase == PH_CNP), .rom_addr(cycle),
      .vc_in(vc[g]), .cv_out(cv[g]));
  end

  // Output: RAM read in cycle t, selected and registered in cycle t+1.
  logic          out_v1;
  logic [CW-1:0] out_pe1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_v1        <= 1'b0;
      out_pe1       <= '0;
      dout          <= 1'b0;
      dataout_ready <= 1'b0;
    end else begin
      out_v1        <= out_re;
      out_pe1       <= out_pe;
      dataout_ready <= out_v1;
      dout          <= out_v1 ? pe_out[out_pe1] : 1'b0;
    end
  end

endmodule
