// tb_bch_encoder: encodes random 512-byte sectors at one byte per clock and
// compares the 52 parity bits with x^52 m(x) mod G(x) computed bit-serially
// in the testbench from the known BCH(8191, t=4) generator
// G(x) = 0x14523043ab86ab (x^13+x^4+x^3+x+1 field). Checks that parity is
// ready one clock after the last byte (512 clocks per sector) and that the
// generator the RTL derives equals that constant.
module tb_bch_encoder;
  import bch_pkg::*;
  localparam int unsigned MT = 52;
  localparam logic [MT:0] G_REF = 53'h14523043ab86ab;

  logic clk = 0, rst_n = 0, start = 0, din_valid = 0;
  logic [7:0] din = '0;
  logic [MT-1:0] parity;
  int checks = 0, failures = 0;

  bch_encoder dut (.*);

  always #5 clk = ~clk;

  function automatic logic [MT-1:0] ref_parity(logic [7:0] msg [], int len);
    logic [MT-1:0] r = '0;
    for (int i = 0; i < len; i++)
      for (int b = 7; b >= 0; b--) begin
        logic fb = r[MT-1] ^ msg[i][b];
        r = r << 1;
        if (fb) r ^= G_REF[MT-1:0];
      end
    return r;
  endfunction

  initial begin
    logic [7:0] msg [];
    int cycles;
    checks++;
    if (gen_poly(4, 13, 32'h201B) != poly_t'(G_REF)) begin
      failures++; $display("FAIL generator polynomial");
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      msg = new[512];
      foreach (msg[i]) msg[i] = (s == 0) ? 8'h00 : (s == 1 && i == 0) ? 8'h80 : (s == 1) ? 8'h00 : 8'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0;
      for (int i = 0; i < 512; i++) begin
        din_valid = 1; din = msg[i];
        @(negedge clk); cycles++;
      end
      din_valid = 0;
      checks++;
      if (parity !== ref_parity(msg, 512)) begin
        failures++; $display("FAIL sector %0d parity=%h ref=%h", s, parity, ref_parity(msg, 512));
      end
      checks++;
      if (cycles != 512) begin failures++; $display("FAIL cycles=%0d", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
