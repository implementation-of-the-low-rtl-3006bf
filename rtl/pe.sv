// pe: processing element PE(x,y): one variable node unit serving the L
// variable nodes of group (x,y), with its memories and address generators.
//
// Memories (all L deep, see ldpc_ram):
//   E1, E2, E3  1-bit extrinsic RAMs, one per check sub-matrix H1..H3. Entry
//               v holds the message on the edge between variable v of this
//               group and its check in that sub-matrix: the variable-to-check
//               bit after VNP, the check-to-variable bit after CNP.
//   int_in      LLR_W-bit input RAM, filled serially from outside while the
//               previous frame is being decoded.
//   int_w       INT_W-bit working LLR RAM, updated in every VNP.
//   dec_w       1-bit working decision RAM, written in every VNP.
//   dec_out     1-bit output decision RAM, read serially from outside while
//               the next frame is being decoded.
// Address generators: AG1 starts at 0 in every phase; AG2 starts at
// ((x-1)*y) mod L and AG3 at t(x,y) in CNP, both at 0 otherwise.
//
// Every phase is a three-stage pipeline over L items (L+2 cycles):
//   read   : addresses to the RAMs (data registered at the RAM outputs);
//   modify : CNP - E bits go out on vc_out to the three check blocks and the
//                  check bits come back on cv_in;
//            VNP - the VNU turns the E bits and the stored LLR into new
//                  variable bits, a new LLR and a decision;
//            INIT - the input LLR is sign-extended and passed through the
//                  VNU with zero weights, so it becomes the working LLR and
//                  its sign the first variable bit on all three edges; the
//                  working decision is moved towards the output RAM;
//   write  : results go back to the read address delayed by two cycles.
// The pipeline and memory organisation follow the design; the exact reset
// behaviour and the port grouping are this implementation's.
module pe
  import ldpc_pkg::*;
#(
  parameter int unsigned L      = L_DEF,
  parameter int unsigned X      = 1,      // row index x of this PE, 1..K
  parameter int unsigned Y      = 1,      // column index y of this PE, 1..K
  parameter int unsigned LLR_W  = LLR_W_DEF,
  parameter int unsigned INT_W  = INT_W_DEF,
  parameter int unsigned WEIGHT = WEIGHT_DEF,
  parameter int unsigned AW     = (L > 1) ? $clog2(L) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pe_ctrl_t         ctrl,
  // serial frame input
  input  logic             ld_we,
  input  logic [AW-1:0]    ld_addr,
  input  logic [LLR_W-1:0] ld_data,
  // serial frame output
  input  logic             out_re,
  input  logic [AW-1:0]    out_addr,
  output logic             out_bit,
  // links to the three check node processing elements
  output logic [2:0]       vc_out,
  input  logic [2:0]       cv_in,
  // observation
  output logic             sat_evt   // VNU clipped an LLR in a write cycle
);

  localparam logic [AW-1:0] OFF2 = AW'(h2_offset(X, Y, L));
  localparam logic [AW-1:0] OFF3 = AW'(h3_offset(X, Y, L));

  logic is_cnp, is_vnp, is_init;
  assign is_cnp  = (ctrl.phase == PH_CNP);
  assign is_vnp  = (ctrl.phase == PH_VNP);
  assign is_init = (ctrl.phase == PH_INIT);

  // ---------------------------------------------------------------- AGs
  logic [2:0][AW-1:0] rd_addr, wr_addr, init_val;
  assign init_val[0] = '0;
  assign init_val[1] = is_cnp ? OFF2 : '0;
  assign init_val[2] = is_cnp ? OFF3 : '0;

  for (genvar i = 0; i < 3; i++) begin : g_ag
    addr_gen #(.L(L)) u_ag (
      .clk, .rst_n, .start(ctrl.start), .en(ctrl.rd_en),
      .init_val(init_val[i]), .rd_addr(rd_addr[i]), .wr_addr(wr_addr[i]));
  end

  // Pipeline valid bits: d1 = modify cycle, d2 = write cycle.
  logic v_d1, v_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d1 <= 1'b0;
      v_d2 <= 1'b0;
    end else begin
      v_d1 <= ctrl.rd_en;
      v_d2 <= v_d1;
    end
  end

  // ----------------------------------------------------------- memories
  logic [2:0]             e_rdata;
  logic [2:0]             e_wdata;
  logic                   e_we;
  logic [LLR_W-1:0]       in_rdata;
  logic signed [INT_W-1:0] int_rdata, int_wdata;
  logic                   int_we;
  logic                   decw_rdata, decw_wdata, decw_we;
  logic                   deco_wdata, deco_we;

  assign e_we    = v_d2 && (is_cnp || is_vnp || is_init);
  assign int_we  = v_d2 && (is_vnp || is_init);
  assign decw_we = v_d2 && is_vnp;
  assign deco_we = v_d2 && is_init && ctrl.xfer_out;

  for (genvar i = 0; i < 3; i++) begin : g_e
    ldpc_ram #(.DEPTH(L), .WIDTH(1)) u_e (
      .clk, .we(e_we), .waddr(wr_addr[i]), .wdata(e_wdata[i]),
      .re(ctrl.rd_en && (is_cnp || is_vnp)), .raddr(rd_addr[i]),
      .rdata(e_rdata[i]));
  end

  ldpc_ram #(.DEPTH(L), .WIDTH(LLR_W)) u_int_in (
    .clk, .we(ld_we), .waddr(ld_addr), .wdata(ld_data),
    .re(ctrl.rd_en && is_init), .raddr(rd_addr[0]), .rdata(in_rdata));

  ldpc_ram #(.DEPTH(L), .WIDTH(INT_W)) u_int_w (
    .clk, .we(int_we), .waddr(wr_addr[0]), .wdata(int_wdata),
    .re(ctrl.rd_en && is_vnp), .raddr(rd_addr[0]), .rdata(int_rdata));

  ldpc_ram #(.DEPTH(L), .WIDTH(1)) u_dec_w (
    .clk, .we(decw_we), .waddr(wr_addr[0]), .wdata(decw_wdata),
    .re(ctrl.rd_en && is_init), .raddr(rd_addr[0]), .rdata(decw_rdata));

  ldpc_ram #(.DEPTH(L), .WIDTH(1)) u_dec_out (
    .clk, .we(deco_we), .waddr(wr_addr[0]), .wdata(deco_wdata),
    .re(out_re), .raddr(out_addr), .rdata(out_bit));

  // ------------------------------------------------------------- modify
  assign vc_out = e_rdata;

  logic signed [INT_W-1:0] vnu_llr;
  logic [2:0]              vnu_vc;
  logic                    vnu_dec, vnu_sat;

  logic signed [INT_W-1:0] vnu_in;
  assign vnu_in = is_init ? INT_W'(signed'(in_rdata)) : int_rdata;

  vnu #(.INT_W(INT_W), .WEIGHT(WEIGHT)) u_vnu (
    .init(is_init), .llr_in(vnu_in), .cv(e_rdata), .llr_out(vnu_llr),
    .vc(vnu_vc), .dec(vnu_dec), .sat(vnu_sat));

  logic sat_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_wdata    <= '0;
      int_wdata  <= '0;
      decw_wdata <= 1'b0;
      deco_wdata <= 1'b0;
      sat_d2     <= 1'b0;
    end else if (v_d1) begin
      e_wdata    <= is_cnp ? cv_in : vnu_vc;
      int_wdata  <= vnu_llr;
      decw_wdata <= vnu_dec;
      deco_wdata <= decw_rdata;
      sat_d2     <= vnu_sat;
    end
  end

  assign sat_evt = v_d2 && sat_d2;

endmodule
