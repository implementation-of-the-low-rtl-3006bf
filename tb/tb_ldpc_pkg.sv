// tb_ldpc_pkg: checks the code-construction functions at k = 6, L = 256:
// the H2 offsets against ((x-1)y) mod L (with the worked value u = 3 for
// L = 5, x = 3, y = 4), and the two 4-cycle-free rules for the H3 offsets:
// t(x,y1) != t(x,y2) for y1 != y2, and
// t(x1,y) - t(x2,y) != ((x1-x2)y) mod L for x1 != x2.
// It then builds the whole Tanner graph of the 9216-bit code: H1 and H2
// from their offsets, H3 from t(x,y) and the per-cycle shuffle controls
// (row x rotated by one place when bit x of ROM1 is set, then column y
// when bit y of ROM2 is set). It checks that every check has degree k and
// that no two variables share two checks (no 4-cycle in the whole code).
module tb_ldpc_pkg;
  import ldpc_pkg::*;
  localparam int K = 6, L = 256;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    check(h2_offset(3, 4, 5) == 3, "worked example u = 3");
    for (int x = 1; x <= K; x++)
      for (int y = 1; y <= K; y++)
        check(h2_offset(x, y, L) == ((x - 1) * y) % L, $sformatf("h2 (%0d,%0d)", x, y));
    for (int x = 1; x <= K; x++)
      for (int y1 = 1; y1 <= K; y1++)
        for (int y2 = y1 + 1; y2 <= K; y2++)
          check(h3_offset(x, y1, L) != h3_offset(x, y2, L),
                $sformatf("t(%0d,%0d) = t(%0d,%0d)", x, y1, x, y2));
    for (int y = 1; y <= K; y++)
      for (int x1 = 1; x1 <= K; x1++)
        for (int x2 = 1; x2 <= K; x2++)
          if (x1 != x2) begin
            int d, u;
            d = (int'(h3_offset(x1, y, L)) - int'(h3_offset(x2, y, L)) + L) % L;
            u = (((x1 - x2) * y) % L + L) % L;
            check(d != u, $sformatf("4-cycle rule broken at y=%0d x=%0d,%0d", y, x1, x2));
          end
    graph_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check numbering: H1 row x -> x*L + j, H2 row y -> (K + y)*L + j,
  // H3 row x' -> (2K + x')*L + j, all 0-based.
  localparam int NPE = K * K, NCHK = 3 * K * L;
  int chk [3][NPE][L];

  task automatic graph_check();
    int deg [NCHK];
    bit seen [longint];
    int n4 = 0, nbad = 0;
    for (int c = 0; c < NCHK; c++) deg[c] = 0;
    for (int x0 = 0; x0 < K; x0++)
      for (int y0 = 0; y0 < K; y0++)
        for (int j = 0; j < L; j++) begin
          chk[0][y0 * K + x0][j] = x0 * L + j;
          chk[1][y0 * K + x0][(int'(h2_offset(x0 + 1, y0 + 1, L)) + j) % L] =
            (K + y0) * L + j;
        end
    for (int j = 0; j < L; j++) begin
      logic [31:0] sr, sc;
      sr = shuffle_word(1, j);
      sc = shuffle_word(2, j);
      for (int x0 = 0; x0 < K; x0++)
        for (int y0 = 0; y0 < K; y0++) begin
          int yc, row;
          yc  = sr[x0] ? (y0 + K - 1) % K : y0;
          row = sc[yc] ? (x0 + K - 1) % K : x0;
          chk[2][y0 * K + x0][(int'(h3_offset(x0 + 1, y0 + 1, L)) + j) % L] =
            (2 * K + row) * L + j;
        end
    end
    for (int c = 0; c < NPE; c++)
      for (int v = 0; v < L; v++) begin
        for (int g = 0; g < 3; g++) deg[chk[g][c][v]]++;
        for (int a = 0; a < 3; a++)
          for (int b = a + 1; b < 3; b++) begin
            longint key;
            key = longint'(chk[a][c][v]) * NCHK + chk[b][c][v];
            if (seen.exists(key)) n4++;
            seen[key] = 1'b1;
          end
      end
    for (int c = 0; c < NCHK; c++) if (deg[c] != K) nbad++;
    check(nbad == 0, $sformatf("%0d checks do not have degree %0d", nbad, K));
    check(n4 == 0, $sformatf("%0d pairs of checks share two variables (4-cycles)", n4));
    $display("graph: %0d variables, %0d checks, %0d 4-cycles", NPE * L, NCHK, n4);
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
