// tb_buffer_ram: writes random bytes through both ports into different
// buffers, reads them back through the opposite port, and checks the
// one-clock read latency and that a disabled port neither writes nor reads.
module tb_buffer_ram;
  localparam int DEPTH = 2048;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [10:0] a_addr = '0, b_addr = '0;
  logic [7:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [7:0] model [DEPTH];
  int checks = 0, failures = 0;

  buffer_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] held;
    // fill: port A the lower half, port B the upper half, in the same clocks
    for (int i = 0; i < DEPTH / 2; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 11'(i);             a_wdata = 8'($urandom);
      b_en = 1; b_we = 1; b_addr = 11'(i + DEPTH / 2); b_wdata = 8'($urandom);
      model[i] = a_wdata; model[i + DEPTH / 2] = b_wdata;
    end
    // read back crosswise, random addresses
    for (int n = 0; n < 400; n++) begin
      int ia, ib;
      ia = $urandom % DEPTH; ib = $urandom % DEPTH;
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = 11'(ia);
      b_en = 1; b_we = 0; b_addr = 11'(ib);
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks += 2;
      if (a_rdata !== model[ia]) begin failures++; $display("FAIL A %0d", ia); end
      if (b_rdata !== model[ib]) begin failures++; $display("FAIL B %0d", ib); end
      // disabled port: a write attempt must be ignored and the output held
      held = a_rdata;
      a_we = 1; a_wdata = ~model[ia]; a_addr = 11'(ia);
      @(negedge clk);
      a_we = 0;
      checks++;
      if (a_rdata !== held) begin failures++; $display("FAIL hold"); end
    end
    // the ignored writes must not have changed memory
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); a_en = 1; a_addr = 11'(i * 31);
      @(negedge clk); a_en = 0;
      checks++;
      if (a_rdata !== model[i * 31]) begin failures++; $display("FAIL ignored write %0d", i * 31); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
