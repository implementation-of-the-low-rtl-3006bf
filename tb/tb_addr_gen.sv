// tb_addr_gen: address generator at L = 256 and at the non-power-of-two
// L = 5. For several start offsets a phase of L read cycles must visit
// (init + j) mod L in order, and the write address must repeat each read
// address exactly two cycles later. A second phase checks that the counter
// reloads its new offset on `start`.
module tb_addr_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, en;
  logic [7:0] init_a, rd_a, wr_a;
  logic [2:0] init_b, rd_b, wr_b;

  addr_gen #(.L(256)) dut_a (.clk, .rst_n, .start, .en, .init_val(init_a), .rd_addr(rd_a), .wr_addr(wr_a));
  addr_gen #(.L(5))   dut_b (.clk, .rst_n, .start, .en, .init_val(init_b), .rd_addr(rd_b), .wr_addr(wr_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic phase(input int ia, input int ib, input int n);
    int ha [$], hb [$];
    for (int j = 0; j < n + 2; j++) begin
      @(negedge clk);
      start = (j == 0);
      en = (j < n);
      init_a = 8'(ia);
      init_b = 3'(ib);
      #1;
      if (j < n) begin
        check(rd_a == 8'((ia + j) % 256), $sformatf("L=256 init %0d step %0d rd=%0d", ia, j, rd_a));
        if (j < 5) check(rd_b == 3'((ib + j) % 5), $sformatf("L=5 init %0d step %0d rd=%0d", ib, j, rd_b));
        ha.push_back(rd_a);
        hb.push_back(rd_b);
      end
      if (j >= 2) begin
        check(wr_a == ha[j-2], $sformatf("L=256 wr at %0d", j));
        check(wr_b == hb[j-2], $sformatf("L=5 wr at %0d", j));
      end
    end
  endtask

  initial begin
    start = 0; en = 0; init_a = 0; init_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    phase(0, 0, 256);
    phase(201, 3, 256);
    phase(255, 4, 256);
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
