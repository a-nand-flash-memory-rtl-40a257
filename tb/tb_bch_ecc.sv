// tb_bch_ecc: end-to-end ECC check. Random 512-byte sectors are encoded at one
// byte per clock, the 7 parity bytes taken from parity_words, 0..5 random bit
// errors injected into data or parity, and the word fed back through the
// syndrome/decoder path. Corrections reported on err_* are applied to a copy,
// which must equal the original data for up to 4 errors (with nerr equal to
// the number of flips), and 5 errors must be flagged uncorrectable. The
// decode latency is checked against 1 + 2T + 519 clocks (+1 for the syndrome
// hand-off), and an error-free word must finish one clock after hand-off.
module tb_bch_ecc;
  localparam int NB = 519;
  logic clk = 0, rst_n = 0;
  logic enc_start = 0, enc_valid = 0, dec_start = 0, dec_valid = 0, dec_last = 0;
  logic [7:0] enc_data = '0, dec_data = '0;
  logic [55:0] parity_words;
  logic dec_busy, synd_nonzero, err_valid, err_ready, dec_done, uncorrectable;
  logic [9:0] err_index;
  logic [7:0] err_mask;
  logic [3:0] nerr;
  int checks = 0, failures = 0;

  bch_ecc dut (.*);

  always #5 clk = ~clk;

  logic [7:0] orig [NB];
  logic [7:0] rx   [NB];
  logic [7:0] fixd [NB];
  int corr_count;

  // apply corrections with random back-pressure
  always @(posedge clk) begin
    if (err_valid && err_ready) begin
      fixd[err_index] = fixd[err_index] ^ err_mask;
      corr_count++;
    end
  end
  always @(negedge clk) err_ready <= ($urandom % 3) != 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int nerr_inj, pos, cyc;
    bit ok;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 24; trial++) begin
      nerr_inj = trial % 6;
      for (int i = 0; i < 512; i++) orig[i] = 8'($urandom);
      @(negedge clk) enc_start = 1;
      @(negedge clk) enc_start = 0;
      for (int i = 0; i < 512; i++) begin
        enc_valid = 1; enc_data = orig[i];
        @(negedge clk);
      end
      enc_valid = 0;
      for (int i = 0; i < 7; i++) orig[512+i] = parity_words[55-8*i -: 8];
      rx = orig;
      for (int e = 0; e < nerr_inj; e++) begin
        do pos = $urandom % (NB * 8 - 4); while (((rx[pos/8] ^ orig[pos/8]) >> (7 - pos % 8)) & 1);
        rx[pos / 8][7 - pos % 8] ^= 1'b1;
      end
      fixd = rx;
      corr_count = 0;
      @(negedge clk) dec_start = 1;
      @(negedge clk) dec_start = 0;
      for (int i = 0; i < NB; i++) begin
        dec_valid = 1; dec_data = rx[i]; dec_last = (i == NB - 1);
        @(negedge clk);
      end
      dec_valid = 0; dec_last = 0;
      cyc = 0;
      while (!dec_done) begin @(negedge clk); cyc++; end
      if (nerr_inj == 0) check(cyc == 1, $sformatf("clean latency %0d", cyc));
      else check(cyc >= 1 + 8 + NB, $sformatf("latency %0d", cyc));
      if (nerr_inj <= 4) begin
        ok = 1;
        for (int i = 0; i < NB; i++) if (fixd[i] !== orig[i]) ok = 0;
        check(ok, $sformatf("trial %0d: %0d errors not corrected", trial, nerr_inj));
        check(!uncorrectable, $sformatf("trial %0d flagged uncorrectable", trial));
        check(nerr == 4'(nerr_inj), $sformatf("trial %0d nerr=%0d exp %0d", trial, nerr, nerr_inj));
        check(synd_nonzero == (nerr_inj != 0), "synd_nonzero");
      end else begin
        check(uncorrectable, $sformatf("trial %0d: 5 errors not flagged", trial));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
