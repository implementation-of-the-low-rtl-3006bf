// tb_shuffle_2d: 2-D shuffle network for k = 6 with random controls.
// Forward path: each input is tagged with a one-hot position and must land
// where the row-then-column rotation model puts it, so the network is a
// permutation. Backward path: feeding the forward output back must return
// every bit to the element it came from, for random data.
module tb_shuffle_2d;
  localparam int K = 6;
  logic [K-1:0] sr, sc;
  logic [K-1:0][K-1:0] fwd_in, fwd_out, bwd_in, bwd_out;
  int checks = 0, failures = 0;

  shuffle_2d #(.K(K)) dut (.sr, .sc, .fwd_in, .fwd_out, .bwd_in, .bwd_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      sr = K'($urandom);
      sc = K'($urandom);
      // permutation test: one hot at (x,y)
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) begin
          int yc, xd;
          fwd_in = '0;
          fwd_in[x][y] = 1'b1;
          bwd_in = '0;
          #1;
          yc = sr[x] ? (y + K - 1) % K : y;
          xd = sc[yc] ? (x + K - 1) % K : x;
          check(fwd_out[xd][yc] == 1'b1 && $countones(fwd_out) == 1,
                $sformatf("sr=%b sc=%b (%0d,%0d) not at (%0d,%0d)", sr, sc, x, y, xd, yc));
        end
      // round trip with random data
      for (int x = 0; x < K; x++) fwd_in[x] = K'($urandom);
      #1;
      bwd_in = fwd_out;
      #1;
      check(bwd_out == fwd_in, $sformatf("round trip sr=%b sc=%b", sr, sc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
