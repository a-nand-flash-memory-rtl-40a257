// tb_code_bank: program-bus map and code loading. After reset the low half of
// the code space reads the Boot ROM (test image, byte i = 37*i + 11); the
// common image is loaded (bytes 3*i+1) and, after boot_mode_clr, read back
// at 0x0000; bank 2 is loaded (bytes 5*i+2) and read at 0x8000. The
// testbench supplies the loader's sector data as the buffer manager would.
module tb_code_bank;
  import nfc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] prog_addr = '0;
  logic [7:0] prog_rdata;
  logic boot_mode, boot_mode_clr = 0, load_start = 0, load_target = 0;
  logic [7:0] load_bank = '0;
  logic load_busy, load_done, load_error, cmd_valid, in_ready;
  flash_cmd_t cmd;
  logic cmd_ready = 1, ecc_done = 0, ecc_uncorrectable = 0, in_valid = 0;
  logic [7:0] in_data = '0;
  int checks = 0, failures = 0;
  int ncmd;

  code_bank #(.BOOT_BYTES(256), .BOOT_INIT("tb/boot_rom_test.hex"),
              .COMMON_BYTES(1024), .BANK_BYTES(1024)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (cmd_valid && cmd_ready) ncmd++;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic fetch(int a, logic [7:0] e, string what);
    @(negedge clk) prog_addr = 16'(a);
    @(negedge clk);
    check(prog_rdata === e, $sformatf("%s @%h: %h exp %h", what, a, prog_rdata, e));
  endtask

  task automatic load(bit tgt, int bank, int mul, int add);
    ncmd = 0;
    @(negedge clk) load_start = 1; load_target = tgt; load_bank = 8'(bank);
    @(negedge clk) load_start = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) in_valid = 1; in_data = 8'(mul * i + add);
    end
    @(negedge clk) in_valid = 0;
    check(!load_busy && ncmd == 2, $sformatf("load finished, %0d sector reads", ncmd));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(boot_mode, "boot mode after reset");
    for (int i = 0; i < 64; i += 5) fetch(i, 8'(37 * i + 11), "boot");
    load(0, 0, 3, 1);
    fetch(0, 8'(11), "still boot ROM");
    @(negedge clk) boot_mode_clr = 1;
    @(negedge clk) boot_mode_clr = 0;
    check(!boot_mode, "boot mode cleared");
    for (int i = 0; i < 1024; i += 37) fetch(i, 8'(3 * i + 1), "common");
    load(1, 2, 5, 2);
    for (int i = 0; i < 1024; i += 41) fetch(16'h8000 + i, 8'(5 * i + 2), "bank");
    for (int i = 0; i < 1024; i += 97) fetch(i, 8'(3 * i + 1), "common kept");
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
