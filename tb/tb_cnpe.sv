// tb_cnpe: the three check node processing elements (k = 6, L = 256) with
// random variable bits. Expected check bits are computed here from the
// connection rule of each sub-matrix: H1 joins PE(x,1..k), H2 joins
// PE(1..k,y), H3 joins the elements that the row/column rotations selected
// by ROM1/ROM2 word j send to the same check row. The ROM address is given
// one cycle before the data, as in the decoder.
module tb_cnpe;
  import ldpc_pkg::*;
  localparam int K = 6, L = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rom_re;
  logic [7:0] rom_addr;
  logic [K-1:0][K-1:0] vc, cv1, cv2, cv3;

  cnpe #(.G(1), .K(K), .L(L)) d1 (.clk, .rom_re, .rom_addr, .vc_in(vc), .cv_out(cv1));
  cnpe #(.G(2), .K(K), .L(L)) d2 (.clk, .rom_re, .rom_addr, .vc_in(vc), .cv_out(cv2));
  cnpe #(.G(3), .K(K), .L(L)) d3 (.clk, .rom_re, .rom_addr, .vc_in(vc), .cv_out(cv3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rom_re = 0; rom_addr = 0; vc = '0;
    for (int j = 0; j < L; j++) begin
      logic [31:0] sr, sc;
      bit p1 [K], p2 [K], p3 [K];
      int row [K][K];
      @(negedge clk);
      rom_re = 1; rom_addr = 8'(j);
      @(negedge clk);
      rom_re = 0;
      for (int x = 0; x < K; x++) vc[x] = K'($urandom);
      #1;
      sr = shuffle_word(1, j);
      sc = shuffle_word(2, j);
      for (int i = 0; i < K; i++) begin p1[i] = 0; p2[i] = 0; p3[i] = 0; end
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) begin
          int yc;
          yc = sr[x] ? (y + K - 1) % K : y;
          row[x][y] = sc[yc] ? (x + K - 1) % K : x;
          p1[x] ^= vc[x][y];
          p2[y] ^= vc[x][y];
          p3[row[x][y]] ^= vc[x][y];
        end
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) begin
          check(cv1[x][y] == (p1[x] ^ vc[x][y]), $sformatf("H1 j=%0d (%0d,%0d)", j, x, y));
          check(cv2[x][y] == (p2[y] ^ vc[x][y]), $sformatf("H2 j=%0d (%0d,%0d)", j, x, y));
          check(cv3[x][y] == (p3[row[x][y]] ^ vc[x][y]), $sformatf("H3 j=%0d (%0d,%0d)", j, x, y));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
