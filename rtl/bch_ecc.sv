// bch_ecc: the controller's 4-error-correcting BCH ECC unit on the mass data
// bus, between the buffer manager and the flash sequencer.
//
// Write direction: the sector bytes going to flash are fed to the w-bit
// parallel encoder (bch_encoder) as they pass, one W-bit word per clock;
// parity_words then holds the M*T check bits, left-aligned and padded with
// zero bits at the end to PAR_WORDS whole words, ready to be written after
// the data. Read direction: data and parity words coming from flash are fed
// to the syndrome generator (bch_syndrome); the clock after the word marked
// dec_last, the syndromes are handed to bch_decoder, which reports the bits
// to flip (err_*) and ends with dec_done, nerr and uncorrectable. Because the
// decoder latches the syndromes, the next sector may be fed while it works.
//
// Codeword layout (this design's choice): SECTOR_BYTES data bytes, then the
// parity, then the pad bits, first-received bit = highest power of x. The pad
// bits are zero, so the padded word is still a codeword of the shortened code.
module bch_ecc
  import bch_pkg::*;
#(
  parameter int unsigned M            = GF_M,
  parameter int unsigned T            = BCH_T,
  parameter int unsigned W            = BCH_W,
  parameter int unsigned PRIM         = PRIM_POLY,
  parameter int unsigned DATA_WORDS   = SECTOR_BYTES * 8 / BCH_W,
  parameter int unsigned PAR_WORDS    = (GF_M * BCH_T + BCH_W - 1) / BCH_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // encoder side (flash write)
  input  logic                 enc_start,
  input  logic                 enc_valid,
  input  logic [W-1:0]         enc_data,
  output logic [PAR_WORDS*W-1:0] parity_words,
  // syndrome side (flash read)
  input  logic                 dec_start,
  input  logic                 dec_valid,
  input  logic [W-1:0]         dec_data,
  input  logic                 dec_last,
  output logic                 dec_busy,
  output logic                 synd_nonzero,   // syndromes of the word just fed
  // corrections
  output logic                 err_valid,
  output logic [$clog2(DATA_WORDS+PAR_WORDS)-1:0] err_index,
  output logic [W-1:0]         err_mask,
  input  logic                 err_ready,
  output logic                 dec_done,
  output logic [$clog2(2*T+1)-1:0] nerr,
  output logic                 uncorrectable
);
  logic [M*T-1:0] parity;
  logic [M-1:0]   synd [2*T];
  logic           dec_go;
  logic           core_busy;

  bch_encoder #(.M(M), .T(T), .W(W), .PRIM(PRIM)) u_enc (
    .clk, .rst_n, .start(enc_start), .din_valid(enc_valid), .din(enc_data), .parity
  );

  assign parity_words = {parity, {(PAR_WORDS*W - M*T){1'b0}}};

  bch_syndrome #(.M(M), .T(T), .W(W), .PRIM(PRIM)) u_syn (
    .clk, .rst_n, .start(dec_start), .din_valid(dec_valid), .din(dec_data),
    .synd, .error(synd_nonzero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_go <= 1'b0;
    else        dec_go <= dec_valid && dec_last;
  end

  bch_decoder #(.M(M), .T(T), .W(W), .PRIM(PRIM), .CW_WORDS(DATA_WORDS + PAR_WORDS)) u_dec (
    .clk, .rst_n, .start(dec_go), .synd, .busy(core_busy),
    .err_valid, .err_index, .err_mask, .err_ready,
    .done(dec_done), .nerr, .uncorrectable
  );

  assign dec_busy = core_busy | dec_go;

  initial assert (PAR_WORDS * W >= M * T) else $error("PAR_WORDS too small for the parity");
endmodule
