// tb_cnu: exhaustive test of the check node unit for k = 6: every one of
// the 64 input patterns, each output compared with the XOR of all other
// inputs computed here bit by bit.
module tb_cnu;
  localparam int K = 6;
  logic [K-1:0] vc_in, cv_out;
  int checks = 0, failures = 0;

  cnu #(.K(K)) dut (.vc_in, .cv_out);

  initial begin
    for (int p = 0; p < (1 << K); p++) begin
      vc_in = K'(p);
      #1;
      for (int i = 0; i < K; i++) begin
        bit e;
        e = 1'b0;
        for (int j = 0; j < K; j++) if (j != i) e ^= vc_in[j];
        checks++;
        if (cv_out[i] !== e) begin
          failures++;
          $display("FAIL: in=%b out[%0d]=%b expected %b", vc_in, i, cv_out[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
