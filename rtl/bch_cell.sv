// bch_cell: the basic operation module of the systolic BCH array.
//
// One cell updates one register bit of the LFSR divider for one input bit:
//   r_next = (a & r_top) ^ (a & d) ^ r_prev
// where r_top is the highest-order register (the feedback), d the incoming
// data bit, r_prev the next-lower register and a the generator (or syndrome
// polynomial) coefficient that belongs to this position. This is the general
// equation of the array; the lowest cell of a column is the same cell with
// r_prev tied to 0. It is two AND gates and two XOR gates, as the cell of the
// original design. Purely combinational; the registers sit after the last of
// the w cell layers (bch_parallel_array).
module bch_cell (
  input  logic a,       // polynomial coefficient of this position
  input  logic r_top,   // current highest-order register bit (feedback)
  input  logic d,       // incoming data bit
  input  logic r_prev,  // current next-lower register bit (0 at the bottom)
  output logic r_next
);
  logic fb_term, d_term;
  assign fb_term = a & r_top;
  assign d_term  = a & d;
  assign r_next  = fb_term ^ d_term ^ r_prev;
endmodule
