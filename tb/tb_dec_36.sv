// tb_dec_36: end-to-end test of the LDPC decoder at its default size
// (k = 6, L = 256, 18 iterations, 9216-bit frames).
//
// Four frames are streamed in back to back through din/load: a noisy
// all-zero codeword, a frame of uniformly random LLRs (drives the LLR
// saturation), a second noisy all-zero codeword, and a dummy frame that
// pushes the third frame's decisions out. A reference model in this file
// decodes every frame with the flooding schedule of the reduced-complexity
// algorithm, building the check sets of H1, H2 and H3 directly from the code
// definition (identity blocks, ((x-1)y) mod L shifts, t(x,y) offsets and the
// per-cycle Sr/Sc permutation), and each decoded bit is compared with it.
// Also checked: the phase lengths (INIT, CNP, VNP = L+2 cycles each), the
// decoding time of 2(L+2) cycles per iteration, the 9216 + 258 = 9474 cycles
// from a frame's first symbol to its decoding, the steady frame period of
// (L+2)(2*18+1) = 9546 cycles, the noisy zero codewords
// decoding to all zeros, and that every mechanism happened: load stall,
// loading and unloading overlapped with decoding, Sr/Sc both 0 and 1,
// LLR saturation.
module tb_dec_36;
  import ldpc_pkg::*;

  localparam int K = K_DEF, L = L_DEF, ITER = MAX_ITER_DEF;
  localparam int NPE = K * K, N = NPE * L, W = WEIGHT_DEF;
  localparam int NFR = 4;        // frames streamed in
  localparam int NCHK = 3;       // frames whose decisions are checked

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] din;
  logic load, dout, dataout_ready;

  dec_36 dut (.clk, .rst_n, .din, .load, .dout, .dataout_ready);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // ---------------------------------------------------------- stimulus
  int signed frame_llr [NFR][N];
  bit        expect_bits [NCHK][N];

  function automatic int signed noisy_zero(int perr);
    int signed m;
    m = 1 + int'($urandom_range(14));
    return ($urandom_range(99) < perr) ? -m : m;
  endfunction

  // ----------------------------------------------------- reference model
  function automatic int pe_of(int x0, int y0);
    return y0 * K + x0;
  endfunction

  function automatic void ref_decode(input int f);
    int signed lw [NPE][L];
    bit e [3][NPE][L];
    bit ne [3][NPE][L];
    for (int s = 0; s < N; s++) begin
      lw[s % NPE][s / NPE] = frame_llr[f][s];
      for (int g = 0; g < 3; g++) e[g][s % NPE][s / NPE] = (frame_llr[f][s] < 0);
    end
    for (int it = 0; it < ITER; it++) begin
      // H1: check (x, j) joins variable j of PE(x, 1..k)
      for (int x0 = 0; x0 < K; x0++)
        for (int j = 0; j < L; j++) begin
          bit p = 0;
          for (int y0 = 0; y0 < K; y0++) p ^= e[0][pe_of(x0, y0)][j];
          for (int y0 = 0; y0 < K; y0++)
            ne[0][pe_of(x0, y0)][j] = p ^ e[0][pe_of(x0, y0)][j];
        end
      // H2: check (y, j) joins variable ((x-1)y + j) mod L of PE(1..k, y)
      for (int y0 = 0; y0 < K; y0++)
        for (int j = 0; j < L; j++) begin
          bit p = 0;
          for (int x0 = 0; x0 < K; x0++)
            p ^= e[1][pe_of(x0, y0)][(x0 * (y0 + 1) + j) % L];
          for (int x0 = 0; x0 < K; x0++) begin
            int v = (x0 * (y0 + 1) + j) % L;
            ne[1][pe_of(x0, y0)][v] = p ^ e[1][pe_of(x0, y0)][v];
          end
        end
      // H3: in cycle j, PE(x,y) sends variable (t(x,y) + j) mod L through
      // the row stage (rotate row x when Sr[x]) and column stage (rotate
      // column when Sc); it lands in check row x' of CNPE3.
      for (int j = 0; j < L; j++) begin
        logic [31:0] sr, sc;
        bit p [K];
        int row [K][K];
        int adr [K][K];
        sr = shuffle_word(1, j);
        sc = shuffle_word(2, j);
        for (int r = 0; r < K; r++) p[r] = 0;
        for (int x0 = 0; x0 < K; x0++)
          for (int y0 = 0; y0 < K; y0++) begin
            int yc;
            yc = sr[x0] ? (y0 + K - 1) % K : y0;
            row[x0][y0] = sc[yc] ? (x0 + K - 1) % K : x0;
            adr[x0][y0] = ((x0 + 1) * (x0 + 1) + (x0 + 1) * (y0 + 1) + 7 * (y0 + 1) + j) % L;
            p[row[x0][y0]] ^= e[2][pe_of(x0, y0)][adr[x0][y0]];
          end
        for (int x0 = 0; x0 < K; x0++)
          for (int y0 = 0; y0 < K; y0++)
            ne[2][pe_of(x0, y0)][adr[x0][y0]] =
              p[row[x0][y0]] ^ e[2][pe_of(x0, y0)][adr[x0][y0]];
      end
      // Variable nodes
      for (int c = 0; c < NPE; c++)
        for (int v = 0; v < L; v++) begin
          int yv [3];
          int tot;
          for (int g = 0; g < 3; g++) yv[g] = ne[g][c][v] ? -W : W;
          tot = lw[c][v] + yv[0] + yv[1] + yv[2];
          for (int g = 0; g < 3; g++) e[g][c][v] = (tot - yv[g]) < 0;
          if (tot > 127) tot = 127;
          if (tot < -128) tot = -128;
          lw[c][v] = tot;
        end
    end
    for (int s = 0; s < N; s++) expect_bits[f][s] = (lw[s % NPE][s / NPE] < 0);
  endfunction

  // ------------------------------------------------------------- driver
  int fi = 0, si = 0;
  always @(posedge clk) begin
    if (rst_n && load) begin
      if (si == N - 1) begin
        si <= 0;
        fi <= fi + 1;
      end else begin
        si <= si + 1;
      end
    end
  end
  assign din = (fi < NFR) ? 5'(frame_llr[fi][si]) : 5'd0;

  // ------------------------------------------------------------ monitor
  int of = 0, os = 0, mism [NCHK];
  int ones [NCHK];
  always @(posedge clk) begin
    if (rst_n && dataout_ready && of < NCHK) begin
      if (dout !== expect_bits[of][os]) mism[of]++;
      if (dout) ones[of]++;
      if (os == N - 1) begin
        os <= 0;
        of <= of + 1;
      end else os <= os + 1;
    end
  end

  // ------------------------------------------------- phase / mechanisms
  phase_e ph, ph_q;
  int     ph_len = 0;
  int     n_init = 0, n_cnp = 0, n_vnp = 0, bad_len = 0;
  int     dec_start = 0, dec_len [$], period [$];
  int     first_load = -1, first_in = 0;
  int     n_stall = 0, n_load_dec = 0, n_out_dec = 0, n_sat = 0;
  int     n_sr1 = 0, n_sr0 = 0, n_sc1 = 0, n_sc0 = 0;
  assign ph = dut.u_ctrl.phase;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (load && first_load < 0) first_load = cyc;
      ph_q <= ph;
      if (ph != ph_q) begin
        if (ph_q != PH_IDLE && ph_len != L + 2) bad_len++;
        if (ph_q == PH_INIT) n_init++;
        if (ph_q == PH_CNP) n_cnp++;
        if (ph_q == PH_VNP) n_vnp++;
        if (ph_q == PH_INIT && ph == PH_CNP) begin
          if (dec_start != 0) period.push_back(cyc - dec_start);
          else first_in = cyc - first_load;
          dec_start = cyc;
        end
        if (ph_q == PH_VNP && ph != PH_CNP) dec_len.push_back(cyc - dec_start);
        ph_len = 1;
      end else ph_len++;
      if (!load && dut.u_ctrl.in_full && ph != PH_INIT) n_stall++;
      if (load && (ph == PH_CNP || ph == PH_VNP)) n_load_dec++;
      if (dataout_ready && (ph == PH_CNP || ph == PH_VNP)) n_out_dec++;
      n_sat += $countones(dut.pe_sat);
      if (ph == PH_CNP && dut.u_ctrl.ctrl.rd_en) begin
        logic [K-1:0] sr, sc;
        sr = dut.g_cnpe[2].u_cnpe.g_pi3.sr;
        sc = dut.g_cnpe[2].u_cnpe.g_pi3.sc;
        n_sr1 += $countones(sr); n_sr0 += K - $countones(sr);
        n_sc1 += $countones(sc); n_sc0 += K - $countones(sc);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // --------------------------------------------------------- main flow
  initial begin
    for (int f = 0; f < NFR; f++)
      for (int s = 0; s < N; s++)
        case (f)
          0: frame_llr[f][s] = noisy_zero(1);
          1: frame_llr[f][s] = int'($urandom_range(31)) - 16;
          2: frame_llr[f][s] = noisy_zero(2);
          default: frame_llr[f][s] = int'($urandom_range(31)) - 16;
        endcase
    for (int f = 0; f < NCHK; f++) begin
      mism[f] = 0; ones[f] = 0;
      ref_decode(f);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (of == NCHK);
    repeat (4) @(posedge clk);
    for (int f = 0; f < NCHK; f++) begin
      check(mism[f] == 0, $sformatf("frame %0d: %0d bits differ from reference", f, mism[f]));
    end
    for (int f = 0; f < NCHK; f++) begin
      int e;
      e = 0;
      for (int s = 0; s < N; s++) e += expect_bits[f][s];
      $display("frame %0d: %0d ones decoded (reference %0d)", f, ones[f], e);
    end
    check(ones[0] == 0, "noisy zero codeword 0 not decoded to all zeros");
    check(ones[2] == 0, "noisy zero codeword 2 not decoded to all zeros");
    check(bad_len == 0, $sformatf("%0d phases not L+2 cycles long", bad_len));
    check(n_cnp - n_vnp <= 1 && n_vnp >= NCHK * ITER, "CNP/VNP phase count");
    check(dec_len.size() >= NCHK, "decode runs observed");
    foreach (dec_len[i])
      check(dec_len[i] == 2 * (L + 2) * ITER,
            $sformatf("decode took %0d cycles, expected %0d", dec_len[i], 2 * (L + 2) * ITER));
    $display("mechanisms: init=%0d cnp=%0d vnp=%0d stall=%0d load_during_decode=%0d out_during_decode=%0d sat=%0d sr0/1=%0d/%0d sc0/1=%0d/%0d",
             n_init, n_cnp, n_vnp, n_stall, n_load_dec, n_out_dec, n_sat, n_sr0, n_sr1, n_sc0, n_sc1);
    check(n_init >= NCHK, "INIT phase never ran");
    check(n_stall > 0, "load stall never happened");
    check(n_load_dec > 0, "loading never overlapped decoding");
    check(n_out_dec > 0, "unloading never overlapped decoding");
    check(n_sat > 0, "LLR saturation never happened");
    check(n_sr0 > 0 && n_sr1 > 0 && n_sc0 > 0 && n_sc1 > 0, "shuffle controls not exercised");
    $display("first frame: %0d cycles from first symbol to decoding", first_in);
    check(first_in == N + L + 2,
          $sformatf("first frame took %0d cycles to start decoding, expected %0d", first_in, N + L + 2));
    check(period.size() > 0, "no steady-state frame period observed");
    foreach (period[i])
      check(period[i] == (L + 2) * (2 * ITER + 1),
            $sformatf("frame period %0d cycles, expected %0d", period[i], (L + 2) * (2 * ITER + 1)));
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
