// tb_pe: one processing element, PE(3,4) with L = 16, driven through the
// phase sequence the controller produces: load a frame, INIT, two
// iterations of CNP and VNP, load a second frame, INIT with the decision
// transfer, then read the output decision RAM. A model kept here holds the
// extrinsic bits, LLRs and decisions. Checked: in CNP each extrinsic RAM is
// read from its start offset (0, ((x-1)y) mod L = 8, t(3,4) = 1) upward and
// the bits returned on cv_in are written back to the address they came
// from; in VNP the VNU arithmetic; after the second INIT the output
// decisions and the new frame's initial messages.
module tb_pe;
  import ldpc_pkg::*;
  localparam int L = 16, X = 3, Y = 4, W = 4;
  localparam int OFF [3] = '{0, ((X - 1) * Y) % L, (X * X + X * Y + 7 * Y) % L};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  pe_ctrl_t ctrl;
  logic ld_we, out_re, out_bit, sat_evt;
  logic [3:0] ld_addr, out_addr;
  logic [4:0] ld_data;
  logic [2:0] vc_out, cv_in;

  pe #(.L(L), .X(X), .Y(Y), .LLR_W(5), .INT_W(8), .WEIGHT(W)) dut (
    .clk, .rst_n, .ctrl, .ld_we, .ld_addr, .ld_data, .out_re, .out_addr,
    .out_bit, .vc_out, .cv_in, .sat_evt);

  int  m_in [L];
  int  m_llr [L];
  bit  m_e [3][L];
  bit  m_dec [L];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_frame();
    for (int a = 0; a < L; a++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 4'(a);
      m_in[a] = int'($urandom_range(31)) - 16;
      ld_data = 5'(m_in[a]);
    end
    @(negedge clk);
    ld_we = 0;
  endtask

  // Runs one phase of L+2 cycles. Checks and model updates per item.
  task automatic run_phase(input phase_e ph, input bit xo);
    bit  n_e [3][L];
    int  n_llr [L];
    bit  n_dec [L];
    n_e = m_e; n_llr = m_llr; n_dec = m_dec;
    for (int n = 0; n < L + 2; n++) begin
      @(negedge clk);
      ctrl.phase = ph; ctrl.start = (n == 0); ctrl.rd_en = (n < L); ctrl.xfer_out = xo;
      if (n >= 1 && n <= L) begin
        int j;
        j = n - 1;   // item whose data is now at the RAM outputs
        if (ph == PH_CNP) begin
          cv_in = 3'($urandom);
          for (int g = 0; g < 3; g++) begin
            int a;
            a = (OFF[g] + j) % L;
            check(vc_out[g] == m_e[g][a], $sformatf("CNP E%0d item %0d addr %0d", g + 1, j, a));
            n_e[g][a] = cv_in[g];
          end
        end else if (ph == PH_VNP) begin
          int y [3];
          int tot;
          for (int g = 0; g < 3; g++) begin
            check(vc_out[g] == m_e[g][j], $sformatf("VNP E%0d addr %0d", g + 1, j));
            y[g] = m_e[g][j] ? -W : W;
          end
          tot = m_llr[j] + y[0] + y[1] + y[2];
          for (int g = 0; g < 3; g++) n_e[g][j] = (tot - y[g]) < 0;
          if (tot > 127) tot = 127;
          if (tot < -128) tot = -128;
          n_llr[j] = tot;
          n_dec[j] = tot < 0;
        end else begin
          for (int g = 0; g < 3; g++) n_e[g][j] = m_in[j] < 0;
          n_llr[j] = m_in[j];
        end
      end
    end
    @(negedge clk);
    ctrl.phase = PH_IDLE; ctrl.start = 0; ctrl.rd_en = 0; ctrl.xfer_out = 0;
    m_e = n_e; m_llr = n_llr; m_dec = n_dec;
  endtask

  initial begin
    ctrl = '{phase: PH_IDLE, start: 0, rd_en: 0, xfer_out: 0};
    ld_we = 0; ld_addr = 0; ld_data = 0; out_re = 0; out_addr = 0; cv_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_frame();
    run_phase(PH_INIT, 1'b0);
    for (int it = 0; it < 2; it++) begin
      run_phase(PH_CNP, 1'b0);
      run_phase(PH_VNP, 1'b0);
    end
    begin
      bit saved [L];
      saved = m_dec;
      load_frame();
      run_phase(PH_INIT, 1'b1);
      for (int a = 0; a < L; a++) begin
        @(negedge clk);
        out_re = 1; out_addr = 4'(a);
        @(posedge clk); #1;
        check(out_bit == saved[a], $sformatf("output decision %0d", a));
      end
      out_re = 0;
    end
    run_phase(PH_CNP, 1'b0);   // checks the second frame's initial messages
    run_phase(PH_VNP, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
