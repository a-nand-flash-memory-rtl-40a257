// bch_decoder: error locator and Chien search for the t-error-correcting BCH
// code; turns the 2T syndromes of one received word into error bit masks.
//
// How it works. On start the syndromes are latched, so the syndrome generator
// is free for the next sector at once. An all-zero syndrome set finishes in
// one clock with no errors. Otherwise an inversion-free Berlekamp-Massey
// iteration runs one step per clock for 2T clocks, giving the error-locator
// polynomial Lambda(x) of degree L. The Chien search then evaluates Lambda at
// alpha^(-j) for every bit position j of the received word, W positions per
// clock, walking the word from its first-received word to its last, so error
// masks come out in stream order. A position is in error when Lambda is zero
// there. The word is uncorrectable when the number of roots found in the word
// differs from L (more than T errors).
//
// Interface. The received word is CW_WORDS words of W bits, the first bit
// received being the highest power of x. err_valid/err_index/err_mask give a
// word index and the bits to flip in it (bit W-1 = first received); the search
// holds while err_valid is high and err_ready is low. done pulses for one
// clock at the end with nerr and uncorrectable valid until the next start.
// busy is high from start to done. Latency: 1 + 2T + CW_WORDS clocks plus
// stall clocks (1 clock for an error-free word).
//
// The document specifies the syndrome side of the decoder; the locator
// algorithm and the Chien search structure here are this design's choice.
module bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned M        = GF_M,
  parameter int unsigned T        = BCH_T,
  parameter int unsigned W        = BCH_W,
  parameter int unsigned PRIM     = PRIM_POLY,
  parameter int unsigned CW_WORDS = SECTOR_BYTES + (GF_M * BCH_T + BCH_W - 1) / BCH_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [M-1:0]                synd [2*T],
  output logic                        busy,
  output logic                        err_valid,
  output logic [$clog2(CW_WORDS)-1:0] err_index,
  output logic [W-1:0]                err_mask,
  input  logic                        err_ready,
  output logic                        done,
  output logic [$clog2(2*T+1)-1:0]    nerr,
  output logic                        uncorrectable
);
  localparam longint NBITS = longint'(CW_WORDS) * longint'(W);
  localparam int unsigned IW = $clog2(CW_WORDS);
  localparam int unsigned LW = $clog2(2*T+1);

  typedef enum logic [1:0] {S_IDLE, S_BM, S_CHIEN} state_e;
  state_e state;

  logic [M-1:0] s_q   [2*T];
  logic [M-1:0] lam   [T+1];
  logic [M-1:0] bpoly [T+1];
  logic [M-1:0] gamma;
  logic [LW-1:0] len;          // current locator degree L
  logic [LW-1:0] step;         // BM iteration r
  logic [IW-1:0] word;         // Chien word index
  logic [M-1:0] chien [T+1];   // Lambda_i * alpha^(-i j) for the word's first bit
  logic [15:0]   roots;        // Chien roots found so far

  function automatic logic [M-1:0] apow(longint e);
    gf_t r = gf_alpha_pow(e, M, PRIM);
    return r[M-1:0];
  endfunction

  function automatic logic [M-1:0] mul(logic [M-1:0] a, logic [M-1:0] b);
    gf_t r = gf_mul(gf_t'(a), gf_t'(b), M, PRIM);
    return r[M-1:0];
  endfunction

  // ---- Berlekamp-Massey step (combinational) ----
  logic [M-1:0] delta;
  always_comb begin
    delta = '0;
    for (int i = 0; i <= int'(T); i++)
      if (int'(step) - i >= 0) delta ^= mul(lam[i], s_q[int'(step) - i]);
  end

  // ---- Chien evaluation of W positions (combinational) ----
  logic [W-1:0] hit;
  always_comb begin
    for (int p = 0; p < int'(W); p++) begin
      logic [M-1:0] sum;
      sum = '0;
      for (int i = 0; i <= int'(T); i++)
        sum ^= mul(chien[i], apow(longint'(i) * longint'(p)));
      hit[W-1-p] = (sum == '0);
    end
  end

  logic [LW+3:0] hit_count;
  always_comb begin
    hit_count = '0;
    for (int p = 0; p < int'(W); p++) hit_count += (LW+4)'(hit[p]);
  end

  assign busy      = (state != S_IDLE);
  assign err_valid = (state == S_CHIEN) && (hit != '0);
  assign err_index = word;
  assign err_mask  = hit;

  logic any_synd;
  always_comb begin
    any_synd = 1'b0;
    for (int i = 0; i < 2*int'(T); i++) any_synd |= (synd[i] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0;
      nerr <= '0;
      uncorrectable <= 1'b0;
      gamma <= '0;
      len <= '0;
      step <= '0;
      word <= '0;
      roots <= '0;
      for (int i = 0; i < 2*int'(T); i++) s_q[i] <= '0;
      for (int i = 0; i <= int'(T); i++) begin
        lam[i] <= '0; bpoly[i] <= '0; chien[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < 2*int'(T); i++) s_q[i] <= synd[i];
          for (int i = 0; i <= int'(T); i++) begin
            lam[i]   <= (i == 0) ? M'(1) : '0;
            bpoly[i] <= (i == 0) ? M'(1) : '0;
          end
          gamma <= M'(1);
          len   <= '0;
          step  <= '0;
          if (any_synd) begin
            state <= S_BM;
          end else begin
            done <= 1'b1;
            nerr <= '0;
            uncorrectable <= 1'b0;
          end
        end
        S_BM: begin
          // Lambda <- gamma*Lambda + delta*x*B
          for (int i = 0; i <= int'(T); i++)
            lam[i] <= mul(gamma, lam[i]) ^ ((i > 0) ? mul(delta, bpoly[i-1]) : '0);
          if (delta != '0 && 2 * int'(len) <= int'(step)) begin
            for (int i = 0; i <= int'(T); i++) bpoly[i] <= lam[i];
            len   <= LW'(int'(step) + 1 - int'(len));
            gamma <= delta;
          end else begin
            for (int i = 0; i <= int'(T); i++) bpoly[i] <= (i > 0) ? bpoly[i-1] : '0;
          end
          step <= step + 1'b1;
          if (int'(step) == 2 * int'(T) - 1) state <= S_CHIEN;
          word  <= '0;
          roots <= '0;
          // Chien registers for the first word: Lambda_i * alpha^(-i (NBITS-1)),
          // loaded from the Lambda that this last BM step produces.
          for (int i = 0; i <= int'(T); i++)
            chien[i] <= mul(mul(gamma, lam[i]) ^ ((i > 0) ? mul(delta, bpoly[i-1]) : '0),
                            apow(-longint'(i) * (NBITS - 1)));
        end
        S_CHIEN: if (!err_valid || err_ready) begin
          roots <= roots + 16'(hit_count);
          for (int i = 0; i <= int'(T); i++)
            chien[i] <= mul(chien[i], apow(longint'(i) * longint'(W)));
          if (int'(word) == int'(CW_WORDS) - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
            nerr  <= len;
            uncorrectable <= (int'(roots) + int'(hit_count) != int'(len)) || (int'(len) > int'(T));
          end
          word <= word + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
