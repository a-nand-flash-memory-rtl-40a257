// tb_nand_flash_controller: end-to-end test of the controller at its default
// parameters, with two NAND chip models on the two channels. The testbench
// plays the SD/MMC decoder (host byte streams) and the MCU firmware (flash
// operations, buffer direction, code loading, parameter table).
//
// Sequence: reset the chips; write 12 host sectors to flash, four sectors per
// page program (host stalls when all buffers are full, host transfers overlap
// flash programming); flip bits in the chips (1, 4 and 5 errors in three
// sectors) and read the 12 sectors back with two page reads of 8 and 4
// sectors (corrections applied, 5 errors reported uncorrectable, sequencer
// waits for the busy ECC decoder, total clocks checked against a bound); write and read back a flash parameter table;
// store a common-code image and code bank #1 in flash, load both through the
// code loader, leave boot mode and fetch them on the program bus; erase a
// block; provoke a program failure. Each mechanism is counted and must occur.
module tb_nand_flash_controller;
  import nfc_pkg::*;
  localparam int NSEC = 12;
  localparam int SB = 512;
  // read-back bound: the host side takes a byte on 3 clocks of 4 (so 4/3
  // clocks per byte), plus one sector of flash latency before the first
  // byte, three full decoder runs (1 + 8 + 519 clocks) for the sectors with
  // errors and two page reads, plus 5%
  localparam int RD_CLKS_MAX = (NSEC * SB * 4 / 3 + 520 + 3 * 528 + 2 * 100) * 105 / 100;

  logic clk = 0, rst_n = 0;
  logic host_wr_valid = 0, host_wr_ready, host_rd_valid, host_rd_ready = 0;
  logic [7:0] host_wr_data = '0, host_rd_data;
  logic mcu_mode = 0, mcu_flush = 0, mcu_cmd_valid = 0, mcu_cmd_ready, flash_done;
  flash_cmd_t mcu_cmd = '0;
  logic [1:0] flash_status_fail;
  logic [3:0] free_bufs, ready_secs;
  logic ecc_done, ecc_uncorrectable, ecc_synd_nonzero;
  logic [3:0] ecc_nerr;
  logic [15:0] prog_addr = '0;
  logic [7:0] prog_rdata;
  logic boot_mode, boot_mode_clr = 0, load_start = 0, load_target = 0;
  logic [7:0] load_bank = '0;
  logic load_busy, load_done, load_error;
  logic param_capture = 0, param_clear = 0, param_valid;
  logic [31:0] total_capacity, total_blocks, pages_per_block;
  logic [1:0] flash_ce_n, flash_rb_n;
  logic flash_cle, flash_ale, flash_we_n, flash_re_n, flash_io_oe;
  logic [7:0] flash_io_out [2];
  logic [7:0] flash_io_in [2];
  int checks = 0, failures = 0;

  nand_flash_controller dut (.*);

  nand_model #(.T_PROG(20000)) u_chip0 (
    .ce_n(flash_ce_n[0]), .cle(flash_cle), .ale(flash_ale), .we_n(flash_we_n), .re_n(flash_re_n),
    .io_in(flash_io_out[0]), .io_out(flash_io_in[0]), .rb_n(flash_rb_n[0]));
  nand_model #(.T_PROG(20000)) u_chip1 (
    .ce_n(flash_ce_n[1]), .cle(flash_cle), .ale(flash_ale), .we_n(flash_we_n), .re_n(flash_re_n),
    .io_in(flash_io_out[1]), .io_out(flash_io_in[1]), .rb_n(flash_rb_n[1]));

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall, n_overlap, n_dual, n_corr_sec, n_uncorr, n_ecc_wait, n_load_common,
      n_load_bank, n_boot_switch, n_param, n_prog_fail, n_erase, n_programs;
  bit in_dout;
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    n_stall = 0; n_overlap = 0; n_dual = 0; n_corr_sec = 0; n_uncorr = 0; n_ecc_wait = 0;
    n_load_common = 0; n_load_bank = 0; n_boot_switch = 0; n_param = 0; n_prog_fail = 0;
    n_erase = 0; n_programs = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (host_wr_valid && !host_wr_ready && free_bufs == 0) n_stall++;
    in_dout = (dut.u_flash_sequencer.state == dut.u_flash_sequencer.S_DOUT) ||
              (dut.u_flash_sequencer.state == dut.u_flash_sequencer.S_RB);
    if (host_wr_valid && host_wr_ready && in_dout) n_overlap++;
    if (ecc_done && !ecc_uncorrectable && ecc_nerr != 0) n_corr_sec++;
    if (ecc_done && ecc_uncorrectable) n_uncorr++;
    if ((dut.u_flash_sequencer.state == dut.u_flash_sequencer.S_WAIT_RD ||
         dut.u_flash_sequencer.state == dut.u_flash_sequencer.S_NEXT_R) && dut.dec_busy) n_ecc_wait++;
    if (load_done && !dut.u_code_bank.u_loader.tgt) n_load_common++;
    if (load_done && dut.u_code_bank.u_loader.tgt) n_load_bank++;
    if (boot_mode_clr && boot_mode) n_boot_switch++;
  end
  // dual channel: a data strobe with different bytes on the two buses
  always @(negedge flash_we_n)
    if (rst_n && !flash_cle && !flash_ale && flash_io_out[0] != flash_io_out[1]) n_dual++;

  // ---------------- host model ----------------
  logic [7:0] wr_q [$];
  logic [7:0] rd_exp [$];
  int rd_got, rd_bad;
  bit rd_check_on;
  always @(negedge clk) begin
    host_wr_valid <= wr_q.size() != 0;
    host_wr_data  <= (wr_q.size() != 0) ? wr_q[0] : 8'h00;
    host_rd_ready <= ($urandom % 4) != 0;
  end
  always @(posedge clk) begin
    if (host_wr_valid && host_wr_ready) void'(wr_q.pop_front());
    if (host_rd_valid && host_rd_ready) begin
      if (rd_check_on && rd_exp.size() != 0 && host_rd_data !== rd_exp[0]) rd_bad++;
      if (rd_exp.size() != 0) void'(rd_exp.pop_front());
      rd_got++;
    end
  end

  // ---------------- MCU model ----------------
  task automatic flash_op(flash_op_e op, int row, int col, int nsec = 1);
    @(negedge clk);
    mcu_cmd = '{op: op, row: 16'(row), col: 12'(col), nsec: 3'(nsec - 1)};
    mcu_cmd_valid = 1;
    @(posedge clk);
    while (!mcu_cmd_ready) @(posedge clk);
    @(negedge clk) mcu_cmd_valid = 0;
    while (!flash_done) @(posedge clk);
    @(negedge clk);
    if (op == OP_PROGRAM) n_programs++;
    if (op == OP_ERASE) n_erase++;
    if (flash_status_fail != 0) n_prog_fail++;
  endtask

  task automatic set_mode(bit m);
    @(negedge clk) mcu_mode = m;
    repeat (2) @(negedge clk);
  endtask

  // host writes n sectors from img (pushed ahead), the MCU programs each one
  // as soon as the buffer manager reports it complete
  task automatic write_sectors(ref logic [7:0] img [], input int n, input int row0, input int per_page,
                              input bit expect_fail = 0, input int per_op = 1);
    set_mode(0);
    foreach (img[i]) if (i < n * SB) wr_q.push_back(img[i]);
    for (int s = 0; s < n; s += per_op) begin
      while (ready_secs == 0) @(negedge clk);
      flash_op(OP_PROGRAM, row0 + s / per_page, (s % per_page) * 260, per_op);
      if (!expect_fail) check(flash_status_fail == 0, $sformatf("program sector %0d", s));
    end
  endtask

  logic [7:0] data [];
  logic [7:0] fw [];

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    flash_op(OP_RESET, 0, 0);
    // ---------- 1. host write ----------
    data = new[NSEC * SB];
    foreach (data[i]) data[i] = 8'($urandom);
    write_sectors(data, NSEC, 16'h0200, 8, 0, 4);   // four sectors per page program
    check(wr_q.size() == 0, "all host bytes taken");
    check(free_bufs == 4, "buffers empty after writing");
    // ---------- 2. errors in flash, read back ----------
    u_chip0.flip_bit(16'h0200, 1 * 260 + 10, 3);                  // sector 1: 1 error
    u_chip0.flip_bit(16'h0200, 2 * 260 + 0, 7);                   // sector 2: 4 errors
    u_chip1.flip_bit(16'h0200, 2 * 260 + 100, 1);
    u_chip1.flip_bit(16'h0200, 2 * 260 + 255, 0);
    u_chip0.flip_bit(16'h0200, 2 * 260 + 257, 4);                 //   (one in parity)
    for (int k = 0; k < 5; k++) u_chip1.flip_bit(16'h0200, 3 * 260 + 20 * k, k);  // sector 3: 5
    set_mode(1);
    rd_exp.delete(); rd_got = 0; rd_bad = 0; rd_check_on = 0;
    for (int i = 0; i < NSEC * SB; i++) rd_exp.push_back(data[i]);
    t0 = cyc;
    fork
      begin   // whole-page reads: eight sectors, then four
        flash_op(OP_READ, 16'h0200, 0, 8);
        flash_op(OP_READ, 16'h0201, 0, NSEC - 8);
      end
      begin
        // compare all sectors except sector 3, which stays wrong
        while (rd_got < NSEC * SB) begin
          @(posedge clk);
          rd_check_on = !(rd_got >= 3 * SB && rd_got < 4 * SB);
        end
      end
    join
    check(rd_got == NSEC * SB, $sformatf("read %0d bytes", rd_got));
    check(rd_bad == 0, $sformatf("%0d read bytes differ", rd_bad));
    $display("read of %0d sectors in two page reads: %0d clocks", NSEC, cyc - t0);
    check(cyc - t0 < RD_CLKS_MAX, "page-read throughput");
    // ---------- 3. flash parameter table ----------
    begin
      logic [7:0] tbl [];
      tbl = new[SB];
      foreach (tbl[i]) tbl[i] = 8'h00;
      {tbl[0], tbl[1], tbl[2], tbl[3]} = 32'h4650_524D;
      {tbl[4], tbl[5], tbl[6], tbl[7], tbl[8]}      = {8'd1, 8'h00, 8'h46, 8'h1E, 8'h00};  // 1,984,000
      {tbl[9], tbl[10], tbl[11], tbl[12], tbl[13]}  = {8'd2, 8'h00, 8'h08, 8'h00, 8'h00};  // 2048
      {tbl[14], tbl[15], tbl[16], tbl[17], tbl[18]} = {8'd3, 8'h40, 8'h00, 8'h00, 8'h00};  // 64
      tbl[19] = 8'hFF;
      write_sectors(tbl, 1, 16'h003F, 8);
      set_mode(1);
      @(negedge clk) param_clear = 1; param_capture = 1;
      @(negedge clk) param_clear = 0;
      flash_op(OP_READ, 16'h003F, 0);
      while (free_bufs != 4) @(negedge clk);
      @(negedge clk) param_capture = 0;
      check(param_valid, "parameter table found");
      check(total_capacity == 1_984_000 && total_blocks == 2048 && pages_per_block == 64,
            $sformatf("parameters %0d %0d %0d", total_capacity, total_blocks, pages_per_block));
      if (param_valid) n_param++;
    end
    // ---------- 4. firmware in flash, code loading ----------
    fw = new[2 * 8192];
    foreach (fw[i]) fw[i] = 8'($urandom);
    begin
      logic [7:0] common_img [];
      logic [7:0] bank_img [];
      common_img = new[8192];
      bank_img = new[8192];
      foreach (common_img[i]) common_img[i] = fw[i];
      foreach (bank_img[i]) bank_img[i] = fw[8192 + i];
      write_sectors(common_img, 16, 16'h0040, 8);
      write_sectors(bank_img, 16, 16'h0080 + 2 * 1, 8);   // bank #1: 2 pages per bank
    end
    set_mode(1);
    // boot ROM is mapped while in boot mode (empty image reads 0)
    @(negedge clk) prog_addr = 16'h0010;
    @(negedge clk) check(prog_rdata == 8'h00 && boot_mode, "boot ROM mapped");
    t0 = $time;
    @(negedge clk) load_start = 1; load_target = 0;
    @(negedge clk) load_start = 0;
    while (load_busy) @(negedge clk);
    check(!load_error, "common load without ECC failure");
    @(negedge clk) load_start = 1; load_target = 1; load_bank = 8'd1;
    @(negedge clk) load_start = 0;
    while (load_busy) @(negedge clk);
    check(!load_error, "bank load without ECC failure");
    @(negedge clk) boot_mode_clr = 1;
    @(negedge clk) boot_mode_clr = 0;
    check(!boot_mode, "boot mode left");
    for (int a = 0; a < 8192; a += 61) begin
      @(negedge clk) prog_addr = 16'(a);
      @(negedge clk) check(prog_rdata === fw[a], $sformatf("common code @%h", a));
      @(negedge clk) prog_addr = 16'h8000 + 16'(a);
      @(negedge clk) check(prog_rdata === fw[8192 + a], $sformatf("bank code @%h", a));
    end
    // ---------- 5. erase, program failure ----------
    flash_op(OP_ERASE, 16'h0200, 0);
    check(flash_status_fail == 0, "erase status");
    check(u_chip0.peek(16'h0200, 0) == 8'hFF && u_chip1.peek(16'h0201, 300) == 8'hFF, "block erased");
    u_chip0.fail_next = 1;
    write_sectors(data, 1, 16'h0300, 8, 1);
    check(flash_status_fail == 2'b01, "program failure reported on channel 0");
    // ---------- mechanisms ----------
    $display("mechanisms: host stalls %0d, host/flash overlap %0d, dual-channel strobes %0d, corrected sectors %0d, uncorrectable %0d, ECC waits %0d, common loads %0d, bank loads %0d, boot switches %0d, parameter tables %0d, erases %0d, program failures %0d",
             n_stall, n_overlap, n_dual, n_corr_sec, n_uncorr, n_ecc_wait, n_load_common,
             n_load_bank, n_boot_switch, n_param, n_erase, n_prog_fail);
    check(n_stall > 0, "host stall on full buffers");
    check(n_overlap > 0, "multi-buffering overlap");
    check(n_dual > 0, "dual-channel data strobes");
    check(n_corr_sec >= 2, "ECC corrections");
    check(n_uncorr == 1, "uncorrectable sector detected");
    check(n_ecc_wait > 0, "read waited for the ECC decoder");
    check(n_load_common == 1 && n_load_bank == 1, "code loads");
    check(n_boot_switch == 1, "boot mode switch");
    check(n_param == 1, "parameter table");
    check(n_erase == 1, "erase");
    check(n_prog_fail == 1, "program failure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
