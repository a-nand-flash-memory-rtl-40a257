// tb_code_ram: random writes and reads on the two ports of a program RAM,
// compared with a model array; checks the one-clock read latency and that a
// read in the same clock as a write to that address returns the old byte.
module tb_code_ram;
  logic clk = 0, we = 0, re = 0;
  logic [12:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [8192];
  bit known [8192];
  int checks = 0, failures = 0;

  code_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] expd;
    bit chk;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 0; waddr = 13'($urandom % 512); wdata = 8'($urandom);
      re = 1; raddr = ($urandom % 3 == 0) ? waddr : 13'($urandom % 512);
      chk = known[raddr]; expd = model[raddr];
      @(negedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
      we = 0; re = 0;
      if (chk) begin
        checks++;
        if (rdata !== expd) begin failures++; $display("FAIL read %0d: %h exp %h", raddr, rdata, expd); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
