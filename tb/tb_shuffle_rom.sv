// tb_shuffle_rom: ROM1 and ROM2 of the random-like network at 256 x 6.
// Every address is read; the word must arrive one cycle later and equal the
// low k bits of the control hash, the two ROMs must differ, and every
// control bit must take both values over the 256 words.
module tb_shuffle_rom;
  import ldpc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic re;
  logic [7:0] addr;
  logic [5:0] d1, d2;
  int ones1 [6], ones2 [6];
  int differ = 0;

  shuffle_rom #(.ROM_ID(1), .DEPTH(256), .K(6)) rom1 (.clk, .re, .addr, .data(d1));
  shuffle_rom #(.ROM_ID(2), .DEPTH(256), .K(6)) rom2 (.clk, .re, .addr, .data(d2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    re = 0; addr = 0;
    foreach (ones1[i]) begin ones1[i] = 0; ones2[i] = 0; end
    for (int a = 0; a < 256; a++) begin
      logic [31:0] w1, w2;
      @(negedge clk);
      re = 1; addr = 8'(a);
      @(posedge clk); #1;
      w1 = shuffle_word(1, a);
      w2 = shuffle_word(2, a);
      check(d1 == w1[5:0], $sformatf("ROM1[%0d]=%b expected %b", a, d1, w1[5:0]));
      check(d2 == w2[5:0], $sformatf("ROM2[%0d]=%b expected %b", a, d2, w2[5:0]));
      if (d1 != d2) differ++;
      for (int i = 0; i < 6; i++) begin
        ones1[i] += d1[i];
        ones2[i] += d2[i];
      end
    end
    check(differ > 100, "ROM1 and ROM2 nearly identical");
    for (int i = 0; i < 6; i++) begin
      check(ones1[i] > 0 && ones1[i] < 256, $sformatf("ROM1 bit %0d constant", i));
      check(ones2[i] > 0 && ones2[i] < 256, $sformatf("ROM2 bit %0d constant", i));
    end
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
