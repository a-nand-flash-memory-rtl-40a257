// tb_flash_sequencer: the sequencer with the BCH ECC unit and two NAND chip
// models. Checks: reset; programming a sector puts the even bytes of
// (data, parity, FFh) on chip 0 and the odd bytes on chip 1 at the given
// row/column, parity equal to a bit-serial BCH division done here; the data
// phase takes two clocks per strobe (520 bytes in 520 clocks); reading the
// sector back returns the data on rx and a clean ECC result; after bit flips
// in both chips the reported corrections undo them; an erase clears the
// block; a failing program is reported in status_fail; a three-sector
// program and read use one page operation per chip, lay the sectors out at
// consecutive columns and give three clean ECC codewords.
module tb_flash_sequencer;
  import nfc_pkg::*;
  localparam logic [52:0] G_REF = 53'h14523043ab86ab;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, done;
  flash_cmd_t cmd;
  logic [1:0] status_fail;
  logic tx_valid = 0, tx_ready, rx_valid, rx_ready = 1;
  logic [7:0] tx_data = '0, rx_data;
  logic enc_start, enc_valid, dec_start, dec_valid, dec_last, dec_busy;
  logic [7:0] enc_data, dec_data;
  logic [55:0] parity_words;
  logic [1:0] ce_n, rb_n;
  logic cle, ale, we_n, re_n, io_oe;
  logic [7:0] io_out [2];
  logic [7:0] io_in [2];
  logic err_valid, dec_done, uncorrectable, synd_nonzero;
  logic [9:0] err_index;
  logic [7:0] err_mask;
  logic [3:0] nerr;
  int checks = 0, failures = 0;

  flash_sequencer dut (.*);
  bch_ecc u_ecc (.clk, .rst_n, .enc_start, .enc_valid, .enc_data, .parity_words,
                 .dec_start, .dec_valid, .dec_data, .dec_last, .dec_busy, .synd_nonzero,
                 .err_valid, .err_index, .err_mask, .err_ready(1'b1), .dec_done, .nerr,
                 .uncorrectable);
  nand_model u_chip0 (.ce_n(ce_n[0]), .cle, .ale, .we_n, .re_n, .io_in(io_out[0]),
                      .io_out(io_in[0]), .rb_n(rb_n[0]));
  nand_model u_chip1 (.ce_n(ce_n[1]), .cle, .ale, .we_n, .re_n, .io_in(io_out[1]),
                      .io_out(io_in[1]), .rb_n(rb_n[1]));

  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic run(flash_op_e op, int row, int col, int nsec = 1);
    @(negedge clk);
    cmd = '{op: op, row: 16'(row), col: 12'(col), nsec: 3'(nsec - 1)};
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) @(negedge clk);
  endtask

  logic [7:0] data [512];

  // offer one byte per clock; a byte is taken at the posedge if tx_ready is
  // high after the inputs have settled
  task automatic send_sector(input logic [7:0] x = 8'h00);
    for (int i = 0; i < 512;) begin
      @(negedge clk); tx_valid = 1; tx_data = data[i] ^ x;
      #1 if (tx_ready) i++;
    end
    @(negedge clk) tx_valid = 0;
  endtask
  logic [7:0] rxq [$];
  logic [7:0] fix [512];
  int strobes, first_we, last_we, cyc;
  bit dec_seen;

  int n_dec_done, n_dec_clean;
  always @(posedge clk) begin
    cyc++;
    if (dec_done) dec_seen = 1;
    if (dec_done) n_dec_done++;
    if (dec_done && nerr == 0 && !uncorrectable && !synd_nonzero) n_dec_clean++;
    if (rx_valid && rx_ready) rxq.push_back(rx_data);
    if (err_valid && err_index < 512) fix[err_index] = fix[err_index] ^ err_mask;
  end
  always @(negedge we_n) if (!cle && !ale) begin
    if (strobes == 0) first_we = cyc;
    last_we = cyc;
    strobes++;
  end

  initial begin
    logic [51:0] r;
    logic [7:0] img [520];
    bit ok;
    cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(OP_RESET, 0, 0);
    check(status_fail == 0, "reset");
    // ---- program ----
    foreach (data[i]) data[i] = 8'($urandom);
    r = '0;
    foreach (data[i]) for (int b = 7; b >= 0; b--) begin
      logic fb;
      fb = r[51] ^ data[i][b];
      r = r << 1;
      if (fb) r ^= G_REF[51:0];
    end
    foreach (data[i]) img[i] = data[i];
    for (int i = 0; i < 7; i++) img[512 + i] = ({r, 4'b0} >> (48 - 8 * i));
    img[519] = 8'hFF;
    strobes = 0;
    fork
      run(OP_PROGRAM, 77, 260);
      send_sector();
    join
    check(status_fail == 0, "program status");
    check(strobes == 260, $sformatf("data strobes %0d", strobes));
    check(last_we - first_we == 2 * 259, $sformatf("data phase %0d clocks", last_we - first_we));
    ok = 1;
    for (int i = 0; i < 520; i++)
      if (((i % 2) ? u_chip1.peek(77, 260 + i / 2) : u_chip0.peek(77, 260 + i / 2)) !== img[i]) begin
        ok = 0; $display("byte %0d: %h exp %h", i, (i % 2) ? u_chip1.peek(77, 260 + i / 2) : u_chip0.peek(77, 260 + i / 2), img[i]);
        break;
      end
    check(ok, "flash image (data split over channels, parity appended)");
    // ---- clean read ----
    rxq.delete();
    foreach (fix[i]) fix[i] = 0;
    dec_seen = 0;
    run(OP_READ, 77, 260);
    while (!dec_seen) @(negedge clk);
    check(rxq.size() == 512, $sformatf("rx count %0d", rxq.size()));
    ok = 1;
    foreach (data[i]) if (rxq[i] !== data[i]) ok = 0;
    check(ok, "read data");
    check(!uncorrectable && nerr == 0, "clean read ECC");
    // ---- read with errors in both chips (data and parity) ----
    u_chip0.flip_bit(77, 260 + 3, 5);
    u_chip1.flip_bit(77, 260 + 100, 0);
    u_chip1.flip_bit(77, 260 + 257, 7);   // a parity byte
    u_chip0.flip_bit(77, 260 + 255, 2);
    rxq.delete();
    dec_seen = 0;
    run(OP_READ, 77, 260);
    while (!dec_seen) @(negedge clk);
    foreach (fix[i]) fix[i] = rxq[i] ^ fix[i];
    ok = 1;
    foreach (data[i]) if (fix[i] !== data[i]) ok = 0;
    check(ok, "corrected read");
    check(nerr == 4 && !uncorrectable, $sformatf("nerr=%0d", nerr));
    // ---- erase ----
    run(OP_ERASE, 70, 0);
    check(status_fail == 0, "erase status");
    check(u_chip0.peek(77, 260) == 8'hFF && u_chip1.peek(77, 300) == 8'hFF, "block erased");
    check(u_chip0.erases == 1 && u_chip1.erases == 1, "both chips erased");
    // ---- failing program on channel 1 ----
    u_chip1.fail_next = 1;
    fork
      run(OP_PROGRAM, 200, 0);
      send_sector();
    join
    check(status_fail == 2'b10, $sformatf("program fail status %b", status_fail));
    // ---- multi-sector page operations: three sectors per command ----
    begin
      int p0, r0, t0;
      p0 = u_chip0.programs; r0 = u_chip0.reads;
      strobes = 0;
      fork
        run(OP_PROGRAM, 90, 0, 3);
        begin send_sector(8'h00); send_sector(8'h5A); send_sector(8'hC3); end
      join
      check(status_fail == 0 && u_chip0.programs == p0 + 1 && u_chip1.programs == p0 + 1,
            "three sectors in one page program");
      check(strobes == 3 * 260, $sformatf("multi-sector data strobes %0d", strobes));
      check(u_chip1.peek(90, 2 * 260 + 1) == (data[3] ^ 8'hC3), "third sector at column 520");
      rxq.delete();
      n_dec_done = 0; n_dec_clean = 0;
      t0 = cyc;
      run(OP_READ, 90, 0, 3);
      repeat (4) @(negedge clk);
      check(u_chip0.reads == r0 + 1 && u_chip1.reads == r0 + 1, "one page read for three sectors");
      check(rxq.size() == 3 * 512, $sformatf("multi-sector rx count %0d", rxq.size()));
      ok = 1;
      for (int i = 0; i < 3 * 512; i++)
        if (rxq[i] !== (data[i % 512] ^ ((i / 512 == 0) ? 8'h00 : (i / 512 == 1) ? 8'h5A : 8'hC3))) ok = 0;
      check(ok, "multi-sector read data");
      check(n_dec_done == 3 && n_dec_clean == 3, $sformatf("three clean codewords (%0d of %0d)", n_dec_clean, n_dec_done));
      $display("three-sector read: %0d clocks", cyc - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
