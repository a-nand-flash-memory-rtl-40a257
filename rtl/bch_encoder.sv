// bch_encoder: t-error-correcting, w-bit parallel BCH parity generator.
//
// The message is fed W bits per clock, earliest bit in din[W-1]. The
// generator polynomial G(x) = m1 m3 ... m(2t-1), degree M*T, is computed at
// elaboration by bch_pkg and its coefficients a_0..a_(MT-1) wired into a
// bch_parallel_array, so one clock absorbs W message bits (W layers of
// two-AND/two-XOR cells). After the last word, parity holds the M*T check
// bits of the systematic codeword c(x) = x^(MT) m(x) + parity(x); parity[MT-1]
// is the coefficient of x^(MT-1), i.e. the first parity bit sent.
//
// Handshake: start clears the registers (the cycle of start carries no data);
// each cycle with din_valid absorbs din. parity is valid one clock after the
// last din_valid and stays until the next start.
module bch_encoder
  import bch_pkg::*;
#(
  parameter int unsigned M    = GF_M,
  parameter int unsigned T    = BCH_T,
  parameter int unsigned W    = BCH_W,
  parameter int unsigned PRIM = PRIM_POLY
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           din_valid,
  input  logic [W-1:0]   din,
  output logic [M*T-1:0] parity
);
  localparam poly_t G   = gen_poly(T, M, PRIM);
  localparam int unsigned DEG = poly_degree(G);

  logic [DEG-1:0] rem;

  bch_parallel_array #(.DEG(DEG), .W(W), .COEF(G[DEG-1:0])) u_array (
    .clk, .rst_n, .clear(start), .en(din_valid), .din, .rem
  );

  // DEG equals M*T unless minimal polynomials repeat (small fields only).
  assign parity = (M*T)'(rem);

  initial assert (DEG <= M*T) else $error("generator degree exceeds M*T");
endmodule
