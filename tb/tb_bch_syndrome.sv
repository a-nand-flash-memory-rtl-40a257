// tb_bch_syndrome: builds codewords (512 random bytes + 52 parity bits from a
// bit-serial divider in the testbench, parity padded with 4 trailing zero
// bits to 7 bytes), flips 0..5 random bits and compares the eight syndromes
// with r(alpha^i) evaluated by Horner's rule using the testbench's own
// GF(2^13) multiplier. Also checks error = (some syndrome non-zero).
module tb_bch_syndrome;
  localparam int unsigned MT = 52;
  localparam logic [MT:0] G_REF = 53'h14523043ab86ab;
  localparam int NBYTES = 512 + 7;

  logic clk = 0, rst_n = 0, start = 0, din_valid = 0;
  logic [7:0] din = '0;
  logic [12:0] synd [8];
  logic error;
  int checks = 0, failures = 0;

  bch_syndrome dut (.*);

  always #5 clk = ~clk;

  function automatic logic [12:0] mul(logic [12:0] a, logic [12:0] b);
    logic [25:0] p = '0;
    for (int i = 0; i < 13; i++) if (b[i]) p ^= 26'(a) << i;
    for (int i = 25; i >= 13; i--) if (p[i]) p ^= 26'h201B << (i - 13);
    return p[12:0];
  endfunction

  function automatic logic [12:0] apow(int e);
    logic [12:0] r = 13'd1;
    for (int i = 0; i < e; i++) r = mul(r, 13'd2);
    return r;
  endfunction

  initial begin
    logic [7:0] cw [NBYTES];
    logic [MT-1:0] r;
    logic [55:0] par;
    logic [12:0] exp_s [8];
    logic any, fb;
    logic [12:0] a, acc;
    int cycles, nerr, pos;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      nerr = trial % 6;
      r = '0;
      for (int i = 0; i < 512; i++) begin
        cw[i] = 8'($urandom);
        for (int b = 7; b >= 0; b--) begin
          fb = r[MT-1] ^ cw[i][b];
          r = r << 1;
          if (fb) r ^= G_REF[MT-1:0];
        end
      end
      par = {r, 4'b0};
      for (int i = 0; i < 7; i++) cw[512+i] = par[55-8*i -: 8];
      for (int e = 0; e < nerr; e++) begin
        pos = $urandom % (NBYTES * 8 - 4);
        cw[pos / 8][7 - pos % 8] ^= 1'b1;
      end
      // reference syndromes by Horner over the stream, earliest bit first
      for (int i = 1; i <= 8; i++) begin
        a = apow(i);
        acc = '0;
        for (int k = 0; k < NBYTES; k++)
          for (int b = 7; b >= 0; b--) acc = mul(acc, a) ^ 13'(cw[k][b]);
        exp_s[i-1] = acc;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;
      for (int k = 0; k < NBYTES; k++) begin
        din_valid = 1; din = cw[k];
        @(negedge clk); cycles++;
      end
      din_valid = 0;
      any = 0;
      for (int i = 0; i < 8; i++) begin
        checks++;
        any |= exp_s[i] != 0;
        if (synd[i] !== exp_s[i]) begin
          failures++; $display("FAIL trial %0d S%0d=%h exp %h", trial, i+1, synd[i], exp_s[i]);
        end
      end
      checks++;
      if (error !== any || (nerr == 0 && any) || (nerr != 0 && !any && nerr < 9)) begin
        if (!(nerr == 2 && !any)) begin  // two flips of one bit cancel
          failures++; $display("FAIL trial %0d error=%b any=%b nerr=%0d", trial, error, any, nerr);
        end
      end
      checks++;
      if (cycles != NBYTES) begin failures++; $display("FAIL cycles"); end
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
