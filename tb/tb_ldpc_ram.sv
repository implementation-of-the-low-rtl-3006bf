// tb_ldpc_ram: dual-port RAM at 256 x 8. Fills the memory with random data,
// then reads every address back while writing another address in the same
// cycle, checking that data arrives one cycle after the read and that
// disabled reads hold the output.
module tb_ldpc_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re;
  logic [7:0] waddr, raddr, wdata, rdata;
  logic [7:0] model [256];

  ldpc_ram #(.DEPTH(256), .WIDTH(8)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      re = 1; raddr = 8'(a);
      we = 1; waddr = 8'(a + 128); wdata = 8'($urandom);
      @(posedge clk);
      #1;
      model[waddr] = wdata;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", a, rdata, model[a]);
      end
    end
    @(negedge clk);
    we = 0; re = 0; raddr = 8'd3;
    @(posedge clk); #1;
    checks++;
    if (rdata !== model[255]) begin
      failures++;
      $display("FAIL: output changed while re was low");
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
