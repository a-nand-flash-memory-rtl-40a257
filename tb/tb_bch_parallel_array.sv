// tb_bch_parallel_array: feeds random words into the W-parallel divider and
// compares the registers, every clock, with a bit-serial long division by the
// same polynomial computed in the testbench (x^DEG * M(x) mod P(x)).
// Also checks that clear zeroes the state and that en=0 holds it.
module tb_bch_parallel_array;
  localparam int unsigned DEG = 52;
  localparam int unsigned W   = 8;
  localparam logic [DEG:0] P  = 53'h14523043ab86ab;  // BCH(8191, t=4) G(x)

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] din = '0;
  logic [DEG-1:0] rem;
  logic [DEG-1:0] model = '0;
  int checks = 0, failures = 0;

  bch_parallel_array #(.DEG(DEG), .W(W), .COEF(P[DEG-1:0])) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [DEG-1:0] serial_step(logic [DEG-1:0] r, logic b);
    logic fb = r[DEG-1] ^ b;
    logic [DEG-1:0] n = r << 1;
    if (fb) n ^= P[DEG-1:0];
    return n;
  endfunction

  task automatic check(string what);
    checks++;
    if (rem !== model) begin
      failures++;
      $display("FAIL %s rem=%h model=%h", what, rem, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1 check("reset");
    for (int n = 0; n < 300; n++) begin
      din = W'($urandom);
      en  = ($urandom % 4) != 0;
      clear = (n == 150);
      @(posedge clk);
      if (clear) model = '0;
      else if (en) for (int b = W-1; b >= 0; b--) model = serial_step(model, din[b]);
      #1 check("step");
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
