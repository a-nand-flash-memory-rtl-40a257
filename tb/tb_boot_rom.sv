// tb_boot_rom: loads a 64-byte test image (byte i = (37*i + 11) mod 256) into
// a small boot ROM and checks every address, the one-clock read latency, that
// en=0 holds the output, and that unloaded locations read zero.
module tb_boot_rom;
  logic clk = 0, en = 0;
  logic [7:0] addr = '0;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  boot_rom #(.DEPTH(256), .INIT_FILE("tb/boot_rom_test.hex")) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) en = 1; addr = 8'(i);
      @(negedge clk) en = 0;
      checks++;
      if (rdata !== ((i < 64) ? 8'((37 * i + 11) % 256) : 8'h00)) begin
        failures++; $display("FAIL addr %0d data %h", i, rdata);
      end
      addr = 8'(i + 1);
      @(negedge clk);
      checks++;
      if (rdata !== ((i < 64) ? 8'((37 * i + 11) % 256) : 8'h00)) begin
        failures++; $display("FAIL hold %0d", i);
      end
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
