// tb_multiblock_rate: sequential multi-block write and read throughput of the
// complete controller at its default parameters, with a 50 MHz clock and NAND
// chip models given datasheet-like array times of a 1 Gbit x8 large-page part
// (tR = 25 us, tPROG = 200 us).
//
// The host side is as fast as the controller allows: it offers a write byte
// on every clock and takes every read byte at once. The MCU side programs and
// reads whole page pairs, eight sectors per operation, issuing the next
// operation as soon as the previous one is done. 32 sectors (four page pairs)
// are written and then read back; the data must come back unchanged and with
// no ECC events.
//
// Expected rates per page pair of 4096 data bytes: the flash bus moves one
// byte per clock (two channels, two clocks per strobe), 8 x 520 = 4160 clocks
// = 83.2 us, plus about 1 us of commands and status. Write: 83.2 + 200 us ->
// about 14.4 MB/s. Read: 83.2 + 25 us -> about 37.5 MB/s; the host drains the
// last sector after the flash is done, so the measured read rate is slightly
// lower. The checks allow 3% below these figures.
module tb_multiblock_rate;
  import nfc_pkg::*;
  localparam int SB = 512;
  localparam int NPAGE = 4;
  localparam int NSEC = 8 * NPAGE;
  localparam real WR_MBPS_MIN = 14.0;
  localparam real RD_MBPS_MIN = 36.0;

  logic clk = 0, rst_n = 0;
  logic host_wr_valid = 0, host_wr_ready, host_rd_valid, host_rd_ready = 1;
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

  nand_model #(.T_R(25000), .T_PROG(200000)) u_chip0 (
    .ce_n(flash_ce_n[0]), .cle(flash_cle), .ale(flash_ale), .we_n(flash_we_n), .re_n(flash_re_n),
    .io_in(flash_io_out[0]), .io_out(flash_io_in[0]), .rb_n(flash_rb_n[0]));
  nand_model #(.T_R(25000), .T_PROG(200000)) u_chip1 (
    .ce_n(flash_ce_n[1]), .cle(flash_cle), .ale(flash_ale), .we_n(flash_we_n), .re_n(flash_re_n),
    .io_in(flash_io_out[1]), .io_out(flash_io_in[1]), .rb_n(flash_rb_n[1]));

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ---------------- host model ----------------
  logic [7:0] data [NSEC * SB];
  int wr_n = 0, rd_n = 0, rd_bad = 0, n_ecc_events = 0;
  always @(negedge clk) begin
    host_wr_valid <= (wr_n < NSEC * SB) && !mcu_mode;
    host_wr_data  <= data[wr_n % (NSEC * SB)];
  end
  always @(posedge clk) if (rst_n) begin
    if (host_wr_valid && host_wr_ready) wr_n++;
    if (host_rd_valid && host_rd_ready) begin
      if (host_rd_data != data[rd_n % (NSEC * SB)]) rd_bad++;
      rd_n++;
    end
    if (ecc_done && (ecc_nerr != 0 || ecc_uncorrectable || ecc_synd_nonzero)) n_ecc_events++;
  end

  // ---------------- MCU model ----------------
  task automatic flash_op(flash_op_e op, int row, int nsec);
    @(negedge clk);
    mcu_cmd = '{op: op, row: 16'(row), col: 12'(0), nsec: 3'(nsec - 1)};
    mcu_cmd_valid = 1;
    @(posedge clk);
    while (!mcu_cmd_ready) @(posedge clk);
    @(negedge clk) mcu_cmd_valid = 0;
    while (!flash_done) @(posedge clk);
  endtask

  initial begin
    realtime t0, t_wr, t_rd;
    real wr_mbps, rd_mbps;
    foreach (data[i]) data[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    flash_op(OP_RESET, 0, 1);
    // ---- sequential multi-block write ----
    t0 = $realtime;
    for (int p = 0; p < NPAGE; p++) begin
      flash_op(OP_PROGRAM, 16'h0400 + p, 8);
      check(flash_status_fail == 0, $sformatf("program page %0d", p));
    end
    t_wr = $realtime - t0;
    check(wr_n == NSEC * SB, $sformatf("host wrote %0d bytes", wr_n));
    check(u_chip0.programs == NPAGE && u_chip1.programs == NPAGE, "one program per page pair");
    // ---- sequential multi-block read ----
    @(negedge clk) mcu_mode = 1;
    repeat (2) @(negedge clk);
    t0 = $realtime;
    for (int p = 0; p < NPAGE; p++) flash_op(OP_READ, 16'h0400 + p, 8);
    while (rd_n < NSEC * SB) @(posedge clk);
    t_rd = $realtime - t0;
    check(rd_bad == 0, $sformatf("%0d read bytes differ", rd_bad));
    check(n_ecc_events == 0, "no ECC events on clean data");
    check(u_chip0.reads == NPAGE && u_chip1.reads == NPAGE, "one page read per page pair");
    // bytes per ns * 1000 = MB/s (1 MB = 10^6 bytes)
    wr_mbps = real'(NSEC * SB) / t_wr * 1000.0;
    rd_mbps = real'(NSEC * SB) / t_rd * 1000.0;
    $display("sequential write: %0d bytes in %0.1f us = %0.2f MB/s", NSEC * SB, t_wr / 1000.0, wr_mbps);
    $display("sequential read : %0d bytes in %0.1f us = %0.2f MB/s", NSEC * SB, t_rd / 1000.0, rd_mbps);
    check(wr_mbps >= WR_MBPS_MIN, "write rate");
    check(rd_mbps >= RD_MBPS_MIN, "read rate");
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
