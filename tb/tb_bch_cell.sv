// tb_bch_cell: exhaustive check of the basic cell against its equation
// r_next = a&r_top ^ a&d ^ r_prev over all 16 input combinations.
module tb_bch_cell;
  logic a, r_top, d, r_prev, r_next;
  int checks = 0, failures = 0;

  bch_cell dut (.*);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, r_top, d, r_prev} = 4'(v);
      #1;
      checks++;
      // expected: when a=1 the parity of r_top, d, r_prev, else r_prev
      if (r_next !== (a ? (r_top ^ d ^ r_prev) : r_prev)) begin
        failures++;
        $display("FAIL v=%0d r_next=%b", v, r_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
