// tb_bch_decoder: gives the decoder syndromes computed in the testbench from
// chosen error positions (S_i = sum of alpha^(i*j) over error degrees j, with
// its own GF(2^13) arithmetic), and checks the reported word indices and bit
// masks against those positions, nerr, uncorrectable for 5 errors, and the
// clock count 2T + 519 from start to done.
module tb_bch_decoder;
  localparam int NB = 519;
  localparam int NBITS = NB * 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [12:0] synd [8];
  logic busy, err_valid, done, uncorrectable;
  logic err_ready = 1;
  logic [9:0] err_index;
  logic [7:0] err_mask;
  logic [3:0] nerr;
  int checks = 0, failures = 0;

  bch_decoder dut (.*);

  always #5 clk = ~clk;

  function automatic logic [12:0] mul(logic [12:0] a, logic [12:0] b);
    logic [25:0] p = '0;
    for (int i = 0; i < 13; i++) if (b[i]) p ^= 26'(a) << i;
    for (int i = 25; i >= 13; i--) if (p[i]) p ^= 26'h201B << (i - 13);
    return p[12:0];
  endfunction

  function automatic logic [12:0] apow(int e);
    logic [12:0] r = 13'd1, b = 13'd2;
    while (e > 0) begin
      if (e & 1) r = mul(r, b);
      b = mul(b, b);
      e >>= 1;
    end
    return r;
  endfunction

  logic [7:0] expmask [NB];
  logic [7:0] gotmask [NB];
  always @(posedge clk) if (err_valid && err_ready) gotmask[err_index] = gotmask[err_index] ^ err_mask;

  initial begin
    int ne, s, cyc;
    bit ok;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 18; trial++) begin
      ne = trial % 6;
      foreach (expmask[i]) begin expmask[i] = 0; gotmask[i] = 0; end
      foreach (synd[i]) synd[i] = 0;
      for (int e = 0; e < ne; e++) begin
        do s = $urandom % NBITS; while (expmask[s/8][7 - s%8]);
        expmask[s/8][7 - s%8] = 1'b1;
        for (int i = 1; i <= 8; i++) synd[i-1] ^= apow((i * (NBITS - 1 - s)) % 8191);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != ((ne == 0) ? 1 : 1 + 8 + NB)) begin
        failures++; $display("FAIL trial %0d cycles %0d", trial, cyc);
      end
      if (ne <= 4) begin
        ok = 1;
        foreach (expmask[i]) if (expmask[i] !== gotmask[i]) ok = 0;
        checks++; if (!ok) begin failures++; $display("FAIL trial %0d masks", trial); end
        checks++; if (nerr != 4'(ne) || uncorrectable) begin
          failures++; $display("FAIL trial %0d nerr=%0d unc=%b", trial, nerr, uncorrectable);
        end
      end else begin
        checks++; if (!uncorrectable) begin failures++; $display("FAIL trial %0d 5 errors", trial); end
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
