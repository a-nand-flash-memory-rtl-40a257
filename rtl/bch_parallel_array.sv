// bch_parallel_array: w-bit parallel ("folded") LFSR divider built from
// bch_cell layers.
//
// A serial divider by a degree-DEG polynomial P(x) = x^DEG + sum a_i x^i
// updates its registers R_1..R_DEG once per input bit:
//   R_j' = a_(j-1) (R_DEG ^ D) ^ R_(j-1),   R_1' = a_0 (R_DEG ^ D).
// Chaining W such steps combinationally (W layers of DEG cells, the output of
// one layer being the register input of the next) performs W bit-steps per
// clock, which is the matrix composition Reg(i+w) = G^w Reg(i) + sum G^j g D.
// After a message has been fed, rem holds x^DEG * M(x) mod P(x): the
// systematic parity when P = G(x), and a syndrome remainder when P is a
// minimal polynomial.
//
// Interface: clear (synchronous, has priority) zeroes the registers; when en
// is high, din is absorbed, din[W-1] being the earliest (highest-degree) bit.
// rem[j-1] is R_j. Latency: rem reflects a word one clock after it is given.
module bch_parallel_array #(
  parameter int unsigned DEG  = 52,
  parameter int unsigned W    = 8,
  parameter logic [DEG-1:0] COEF = DEG'(52'h4523043ab86ab)  // a_0..a_(DEG-1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           en,
  input  logic [W-1:0]   din,
  output logic [DEG-1:0] rem
);
  logic [DEG-1:0] stage [W+1];

  assign stage[0] = rem;

  for (genvar l = 0; l < W; l++) begin : g_layer
    // layer l absorbs din[W-1-l]
    for (genvar j = 0; j < DEG; j++) begin : g_cell
      if (j == 0) begin : g_bottom
        bch_cell u_cell (.a(COEF[j]), .r_top(stage[l][DEG-1]), .d(din[W-1-l]),
                         .r_prev(1'b0), .r_next(stage[l+1][j]));
      end else begin : g_mid
        bch_cell u_cell (.a(COEF[j]), .r_top(stage[l][DEG-1]), .d(din[W-1-l]),
                         .r_prev(stage[l][j-1]), .r_next(stage[l+1][j]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rem <= '0;
    else if (clear) rem <= '0;
    else if (en)    rem <= stage[W];
  end
endmodule
