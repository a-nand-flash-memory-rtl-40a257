// tb_code_loader: the testbench plays the flash sequencer and the buffer
// manager. It checks that loading bank 3 (8 KB) issues 16 sector reads at the
// expected rows and columns (bank base 0x80 + 3*2 pages, 8 sectors per page,
// column stride 260), that each byte delivered lands at the next Bank RAM
// address, that loading the common image writes only the Common RAM from page
// 0x40, and that an uncorrectable ECC result sets error.
module tb_code_loader;
  import nfc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, target = 0;
  logic [7:0] bank_no = '0;
  logic busy, done, error, cmd_valid, in_ready, common_we, bank_we;
  flash_cmd_t cmd;
  logic cmd_ready = 0, ecc_done = 0, ecc_uncorrectable = 0, in_valid = 0;
  logic [7:0] in_data = '0, ram_wdata;
  logic [12:0] ram_addr;
  int checks = 0, failures = 0;

  code_loader dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  flash_cmd_t cmds [$];
  int nwr_bank, nwr_common, next_addr;
  bit addr_ok;

  always @(posedge clk) begin
    if (cmd_valid && cmd_ready) cmds.push_back(cmd);
    if (bank_we)   nwr_bank++;
    if (common_we) nwr_common++;
    if (bank_we || common_we) begin
      if (ram_addr != 13'(next_addr) || ram_wdata != 8'(next_addr * 7)) addr_ok = 0;
      next_addr++;
    end
  end
  always @(negedge clk) cmd_ready <= ($urandom % 4) == 0;

  task automatic load(bit tgt, int bank, int nbytes);
    cmds.delete(); nwr_bank = 0; nwr_common = 0; next_addr = 0; addr_ok = 1;
    @(negedge clk) start = 1; target = tgt; bank_no = 8'(bank);
    @(negedge clk) start = 0;
    check(busy, "busy after start");
    for (int i = 0; i < nbytes; i++) begin
      @(negedge clk);
      while ($urandom % 3 == 0) @(negedge clk);
      in_valid = 1; in_data = 8'(i * 7);
      @(negedge clk) in_valid = 0;
    end
    repeat (2) @(negedge clk);
    check(!busy, "idle after image");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(1, 3, 8192);
    check(cmds.size() == 16, $sformatf("bank: %0d commands", cmds.size()));
    foreach (cmds[i])
      check(cmds[i].op == OP_READ && cmds[i].row == 16'(16'h80 + 6 + i / 8) &&
            cmds[i].col == 12'((i % 8) * 260), $sformatf("bank cmd %0d row %h col %0d", i, cmds[i].row, cmds[i].col));
    check(nwr_bank == 8192 && nwr_common == 0, "bank writes");
    check(addr_ok, "bank write addresses/data");
    check(!error, "no error");
    fork
      load(0, 0, 8192);
      begin repeat (50) @(negedge clk); ecc_done = 1; ecc_uncorrectable = 1;
            @(negedge clk) ecc_done = 0; ecc_uncorrectable = 0; end
    join
    check(cmds.size() == 16 && cmds[0].row == 16'h40 && cmds[15].row == 16'h41, "common commands");
    check(nwr_common == 8192 && nwr_bank == 0, "common writes");
    check(addr_ok, "common write addresses/data");
    check(error, "uncorrectable reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
