// bch_syndrome: w-bit parallel syndrome generator for the t-error-correcting
// BCH code.
//
// The received word r(x) is divided, W bits per clock, by each distinct
// minimal polynomial m_j(x), j = 1, 3, ..., 2T-1, using the same folded cell
// array as the encoder with the coefficients of m_j in place of those of
// G(x). The array leaves b_j(x) = x^d r(x) mod m_j(x) (d = deg m_j). Since
// m_j(alpha^i) = 0 for every alpha^i conjugate to alpha^j,
//   S_i = r(alpha^i) = b_j(alpha^i) * alpha^(-i d),
// which is a fixed GF(2)-linear map of the remainder bits: each bit of b_j
// selects a constant alpha^(i(k-d)) and the terms are XORed. All 2T
// syndromes S_1..S_2T are produced this way (even i from the class of its
// odd part).
//
// Handshake as bch_encoder: start clears, din_valid absorbs din (din[W-1]
// earliest). synd and error are valid one clock after the last word.
// error is high when any syndrome is non-zero, i.e. r(x) is not a codeword.
// Any word length may be fed; zero bits fed before the first word do not
// change the result.
module bch_syndrome
  import bch_pkg::*;
#(
  parameter int unsigned M    = GF_M,
  parameter int unsigned T    = BCH_T,
  parameter int unsigned W    = BCH_W,
  parameter int unsigned PRIM = PRIM_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         din_valid,
  input  logic [W-1:0] din,
  output logic [M-1:0] synd [2*T],   // synd[i-1] = S_i
  output logic         error
);
  // One divider per odd index j = 2q+1 (an unused one for repeated classes
  // is simply left out).
  logic [M-1:0] rem_q [T];

  for (genvar q = 0; q < T; q++) begin : g_div
    localparam poly_t       MP  = min_poly(2*q+1, M, PRIM);
    localparam int unsigned DEG = poly_degree(MP);
    logic [DEG-1:0] rem;
    bch_parallel_array #(.DEG(DEG), .W(W), .COEF(MP[DEG-1:0])) u_array (
      .clk, .rst_n, .clear(start), .en(din_valid), .din, .rem
    );
    assign rem_q[q] = M'(rem);
  end

  // S_i = sum_k b_k alpha^(i (k - d)), with b taken from the divider of the
  // odd part of i.
  for (genvar i = 1; i <= 2*T; i++) begin : g_syn
    localparam int unsigned Q   = (odd_part(i) - 1) / 2;
    localparam int unsigned DEG = poly_degree(min_poly(odd_part(i), M, PRIM));
    logic [M-1:0] terms [DEG];
    for (genvar k = 0; k < DEG; k++) begin : g_term
      localparam gf_t C = gf_alpha_pow(longint'(i) * (longint'(k) - longint'(DEG)), M, PRIM);
      assign terms[k] = rem_q[Q][k] ? C[M-1:0] : '0;
    end
    always_comb begin
      synd[i-1] = '0;
      for (int k = 0; k < DEG; k++) synd[i-1] ^= terms[k];
    end
  end

  always_comb begin
    error = 1'b0;
    for (int i = 0; i < 2*T; i++) error |= (synd[i] != '0);
  end
endmodule
