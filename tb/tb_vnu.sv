// tb_vnu: variable node unit against an integer model: all 8 check-message
// patterns for every 8-bit LLR value, in decoding mode and in init mode.
// Decoding: vc[i] = sign(Ln + sum of the other two weights),
// llr_out = clip(Ln + all three weights) to -128..127, dec = sign(llr_out).
// Init: the weights are zero, so llr_out = Ln, all vc = sign(Ln), no clip.
module tb_vnu;
  localparam int INT_W = 8, W = 4;
  logic signed [INT_W-1:0] llr_in, llr_out;
  logic [2:0] cv, vc;
  logic init, dec, sat;
  int checks = 0, failures = 0, nsat = 0;

  vnu #(.INT_W(INT_W), .WEIGHT(W)) dut (.init, .llr_in, .cv, .llr_out, .vc, .dec, .sat);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1;
    init = 1'b0;
    for (int l = -128; l < 128; l++)
      for (int p = 0; p < 8; p++) begin
        int y [3];
        int tot, clip;
        bit [2:0] evc;
        llr_in = INT_W'(l);
        cv = 3'(p);
        #1;
        for (int i = 0; i < 3; i++) y[i] = cv[i] ? -W : W;
        tot = l + y[0] + y[1] + y[2];
        for (int i = 0; i < 3; i++) evc[i] = (tot - y[i]) < 0;
        clip = (tot > 127) ? 127 : (tot < -128) ? -128 : tot;
        if (clip != tot) nsat++;
        check(vc == evc, $sformatf("L=%0d cv=%b vc=%b exp %b", l, cv, vc, evc));
        check(int'(llr_out) == clip, $sformatf("L=%0d cv=%b out=%0d exp %0d", l, cv, llr_out, clip));
        check(dec == (clip < 0), $sformatf("L=%0d cv=%b dec", l, cv));
        check(sat == (clip != tot), $sformatf("L=%0d cv=%b sat", l, cv));
      end
    check(nsat > 0, "saturation never exercised");
    init = 1'b1;
    for (int l = -128; l < 128; l++)
      for (int p = 0; p < 8; p++) begin
        llr_in = INT_W'(l);
        cv = 3'(p);
        #1;
        check(vc == {3{l < 0}}, $sformatf("init L=%0d cv=%b vc=%b", l, cv, vc));
        check(int'(llr_out) == l, $sformatf("init L=%0d out=%0d", l, llr_out));
        check(dec == (l < 0) && !sat, $sformatf("init L=%0d dec/sat", l));
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
