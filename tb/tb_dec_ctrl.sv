// tb_dec_ctrl: sequencer with k = 3, L = 8, four iterations (decoding, 80
// cycles, is then slower than loading, 72 cycles, so load stalls). Checks that
// the input is taken in address-major, PE-minor order, that load drops when
// a frame is complete and stays low during INIT, that phases run
// INIT, (CNP, VNP) x MAX_ITER, each L+2 cycles with start on the first and
// rd_en on the first L cycles, that the iteration counter follows, that the
// second INIT carries the decision transfer, and that the output is read in
// the same order as the input, N cycles in a row, overlapping the decoding.
// INIT must follow without a gap: the first one starts the cycle after the
// last symbol of the first frame, and the controller never idles while a
// complete frame waits and the output buffer is free.
module tb_dec_ctrl;
  import ldpc_pkg::*;
  localparam int K = 3, L = 8, IT = 4, NPE = K * K, N = NPE * L;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pe_ctrl_t ctrl;
  logic [2:0] cycle;
  logic [1:0] iter;
  logic load, out_re;
  logic [3:0] ld_pe, out_pe;
  logic [2:0] ld_addr, out_addr;

  dec_ctrl #(.K(K), .L(L), .MAX_ITER(IT)) dut (
    .clk, .rst_n, .ctrl, .cycle, .iter, .load, .ld_pe, .ld_addr,
    .out_re, .out_pe, .out_addr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int nload = 0, nout = 0, pos = 0, n_init = 0, n_out_dec = 0, n_stall = 0;
  int cnp_in_frame = 0;
  phase_e prev = PH_IDLE;
  phase_e seq [$];
  bit xo [$];

  int cyc = 0, first_full = -1, first_init = -1, n_gap = 0;
  bit decoded = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (load && nload == N - 1) first_full = cyc;
      if (ctrl.phase == PH_INIT && first_init < 0) first_init = cyc;
      // In IDLE a low load means a complete frame is waiting; once a frame
      // has been decoded its results are pending, so only a running
      // output read-out may hold the next INIT back.
      if (ctrl.phase == PH_VNP) decoded = 1'b1;
      if (ctrl.phase == PH_IDLE && !load && !(decoded && out_re)) n_gap++;
      if (load) begin
        check(int'(ld_addr) * NPE + int'(ld_pe) == nload % N, $sformatf("load order at %0d", nload));
        nload++;
      end else if (ctrl.phase != PH_INIT) n_stall++;
      if (ctrl.phase == PH_INIT) check(!load, "load high during INIT");
      if (out_re) begin
        check(int'(out_addr) * NPE + int'(out_pe) == nout % N, $sformatf("output order at %0d", nout));
        nout++;
        if (ctrl.phase == PH_CNP || ctrl.phase == PH_VNP) n_out_dec++;
      end
      if (ctrl.phase != prev && prev != PH_IDLE)
        check(pos == L + 2, $sformatf("phase lasted %0d cycles", pos));
      if (ctrl.phase != PH_IDLE) begin
        if (ctrl.phase != prev) begin
          pos = 0;
          seq.push_back(ctrl.phase);
          if (ctrl.phase == PH_INIT) begin
            xo.push_back(ctrl.xfer_out);
            cnp_in_frame = 0;
          end
          if (ctrl.phase == PH_CNP) begin
            check(int'(iter) == cnp_in_frame, $sformatf("iter %0d at CNP %0d", iter, cnp_in_frame));
            cnp_in_frame++;
          end
        end
        check(ctrl.start == (pos == 0), $sformatf("start at position %0d", pos));
        check(ctrl.rd_en == (pos < L), $sformatf("rd_en at position %0d", pos));
        if (pos < L) check(int'(cycle) == pos, "cycle index");
        pos++;
      end
      prev <= ctrl.phase;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (xo.size() == 3);
    repeat (2) @(posedge clk);
    // expected phase sequence for two complete frames
    for (int f = 0; f < 2; f++) begin
      check(seq[f * (1 + 2 * IT)] == PH_INIT, "INIT first");
      for (int i = 0; i < IT; i++) begin
        check(seq[f * (1 + 2 * IT) + 1 + 2 * i] == PH_CNP, "CNP");
        check(seq[f * (1 + 2 * IT) + 2 + 2 * i] == PH_VNP, "VNP");
      end
    end
    check(xo[0] == 0 && xo[1] == 1 && xo[2] == 1, "xfer_out pattern");
    check(nload >= 3 * N, $sformatf("loaded %0d", nload));
    check(nout >= N, $sformatf("read out %0d", nout));
    check(n_out_dec > 0, "output never overlapped decoding");
    check(n_stall > 0, "load never stalled");
    check(first_init == first_full + 1,
          $sformatf("first INIT at %0d, last symbol at %0d", first_init, first_full));
    check(n_gap == 0, $sformatf("%0d idle cycles with a frame ready", n_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
