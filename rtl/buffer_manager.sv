// buffer_manager: multi-buffering between the host side (SD/MMC decoder or
// code loader) and the flash side (flash sequencer), with ECC write-back.
//
// The NBUF sector buffers of buffer_ram form a ring handled with three
// sector counters: P (sectors completely written by the producer), C
// (sectors released to the consumer) and K (sectors completely read by the
// consumer). The producer may write while P-K < NBUF; the consumer may read
// while C-K > 0. So the host can fill one buffer while the flash side drains
// another, and the other way round, and each side stalls (ready low) only
// when all buffers are full or empty.
//
//   mode 0, flash write: host writes (port A), flash side reads (port B);
//          a sector is released as soon as it is complete (C = P).
//   mode 1, flash read : flash side writes (port B), host reads (port A);
//          a sector is released only when the ECC decoder reports it done
//          (corr_done), after its corrections have been applied. A
//          correction is a read-modify-write on port A (byte XOR mask), which
//          has priority over host reads. Corrections aimed at parity bytes
//          (index >= SECTOR_BYTES) are acknowledged and dropped.
//
// Streams are valid/ready; the read side keeps a two-entry prefetch queue so
// one byte per clock flows despite the RAM's one-clock read latency.
// flush (or a change of mode) empties everything. Buffer count and the
// ordering rules are this design's choice; the document only states that
// multi-buffering is used to match the host-side bandwidth.
module buffer_manager #(
  parameter int unsigned NBUF         = 4,
  parameter int unsigned SECTOR_BYTES = 512,
  parameter int unsigned IDX_W        = 10,   // width of corr_index
  localparam int unsigned AW          = $clog2(NBUF * SECTOR_BYTES),
  localparam int unsigned BW          = $clog2(SECTOR_BYTES),
  localparam int unsigned CW          = $clog2(NBUF) + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mode,       // 0: host -> flash, 1: flash -> host
  input  logic             flush,
  // host side
  input  logic             hw_valid,
  input  logic [7:0]       hw_data,
  output logic             hw_ready,
  output logic             hr_valid,
  output logic [7:0]       hr_data,
  input  logic             hr_ready,
  // flash side
  output logic             ft_valid,
  output logic [7:0]       ft_data,
  input  logic             ft_ready,
  input  logic             fr_valid,
  input  logic [7:0]       fr_data,
  output logic             fr_ready,
  // ECC corrections for the oldest unreleased sector (mode 1)
  input  logic             corr_valid,
  input  logic [IDX_W-1:0] corr_index,
  input  logic [7:0]       corr_mask,
  output logic             corr_ready,
  input  logic             corr_done,
  // status
  output logic [CW-1:0]    free_bufs,
  output logic [CW-1:0]    ready_secs,
  // buffer RAM
  output logic             a_en, a_we,
  output logic [AW-1:0]    a_addr,
  output logic [7:0]       a_wdata,
  input  logic [7:0]       a_rdata,
  output logic             b_en, b_we,
  output logic [AW-1:0]    b_addr,
  output logic [7:0]       b_wdata,
  input  logic [7:0]       b_rdata
);
  logic [CW-1:0] p_cnt, c_cnt, k_cnt;
  logic [BW-1:0] p_byte, k_byte;
  logic          mode_q;
  logic          clear;

  assign clear = flush || (mode != mode_q);

  function automatic logic [AW-1:0] buf_addr(logic [CW-1:0] sec, logic [BW-1:0] idx);
    return AW'((int'(sec) % int'(NBUF)) * int'(SECTOR_BYTES) + int'(idx));
  endfunction

  // ---------------- producer ----------------
  logic prod_room, prod_in_valid, prod_fire;
  assign prod_room     = (CW'(p_cnt - k_cnt) < CW'(NBUF)) && !clear;
  assign prod_in_valid = mode ? fr_valid : hw_valid;
  assign prod_fire     = prod_room && prod_in_valid;
  assign hw_ready      = !mode && prod_room;
  assign fr_ready      =  mode && prod_room;

  // ---------------- corrections (mode 1, port A) ----------------
  typedef enum logic [1:0] {CR_IDLE, CR_READ, CR_WRITE} corr_e;
  corr_e cr_state;
  logic  cr_in_sector;
  assign cr_in_sector = (int'(corr_index) < int'(SECTOR_BYTES));
  // port A is taken by a correction in its read and write clocks
  logic cr_busy_a;
  assign cr_busy_a  = mode && ((cr_state == CR_IDLE && corr_valid && cr_in_sector && !clear) ||
                               cr_state == CR_WRITE);
  assign corr_ready = mode && !clear &&
                      ((cr_state == CR_IDLE && corr_valid && !cr_in_sector) || cr_state == CR_WRITE);

  // ---------------- consumer with 2-entry prefetch ----------------
  logic [7:0] q_data [2];
  logic       q_head;
  logic [1:0] q_cnt;
  logic       inflight;
  logic       cons_avail, cons_issue, cons_pop, cons_ready_in;
  logic [7:0] rd_data;

  assign cons_avail   = (c_cnt != k_cnt) && !clear;
  // issue a read when the queue will have room for its data next clock
  assign cons_issue   = cons_avail && !(mode && cr_busy_a) &&
                        (int'(q_cnt) + int'(inflight) - int'(cons_pop) < 2);
  assign cons_ready_in = mode ? hr_ready : ft_ready;
  assign cons_pop     = (q_cnt != 0) && cons_ready_in;
  assign rd_data      = mode ? a_rdata : b_rdata;

  assign hr_valid = mode && (q_cnt != 0);
  assign ft_valid = !mode && (q_cnt != 0);
  assign hr_data  = q_data[q_head];
  assign ft_data  = q_data[q_head];

  // ---------------- RAM port muxing ----------------
  always_comb begin
    a_en = 1'b0; a_we = 1'b0; a_addr = '0; a_wdata = '0;
    b_en = 1'b0; b_we = 1'b0; b_addr = '0; b_wdata = '0;
    if (!mode) begin
      a_en = prod_fire; a_we = 1'b1; a_addr = buf_addr(p_cnt, p_byte); a_wdata = hw_data;
      b_en = cons_issue; b_addr = buf_addr(k_cnt, k_byte);
    end else begin
      b_en = prod_fire; b_we = 1'b1; b_addr = buf_addr(p_cnt, p_byte); b_wdata = fr_data;
      if (cr_state == CR_WRITE) begin
        a_en = 1'b1; a_we = 1'b1; a_addr = buf_addr(c_cnt, BW'(corr_index));
        a_wdata = a_rdata ^ corr_mask;
      end else if (cr_busy_a) begin
        a_en = 1'b1; a_addr = buf_addr(c_cnt, BW'(corr_index));
      end else begin
        a_en = cons_issue; a_addr = buf_addr(k_cnt, k_byte);
      end
    end
  end

  assign free_bufs  = CW'(NBUF) - CW'(p_cnt - k_cnt);
  assign ready_secs = CW'(c_cnt - k_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= 1'b0;
      p_cnt <= '0; c_cnt <= '0; k_cnt <= '0;
      p_byte <= '0; k_byte <= '0;
      q_head <= 1'b0; q_cnt <= '0; inflight <= 1'b0;
      q_data[0] <= '0; q_data[1] <= '0;
      cr_state <= CR_IDLE;
    end else if (clear) begin
      mode_q <= mode;
      p_cnt <= '0; c_cnt <= '0; k_cnt <= '0;
      p_byte <= '0; k_byte <= '0;
      q_head <= 1'b0; q_cnt <= '0; inflight <= 1'b0;
      cr_state <= CR_IDLE;
    end else begin
      // producer
      if (prod_fire) begin
        if (int'(p_byte) == int'(SECTOR_BYTES) - 1) begin
          p_byte <= '0;
          p_cnt  <= p_cnt + 1'b1;
          if (!mode) c_cnt <= c_cnt + 1'b1;
        end else begin
          p_byte <= p_byte + 1'b1;
        end
      end
      // release after ECC (mode 1)
      if (mode && corr_done) c_cnt <= c_cnt + 1'b1;
      // corrections
      unique case (cr_state)
        CR_IDLE:  if (mode && corr_valid && cr_in_sector) cr_state <= CR_WRITE;
        CR_WRITE: cr_state <= CR_IDLE;
        default:  cr_state <= CR_IDLE;
      endcase
      // consumer
      if (cons_issue) begin
        if (int'(k_byte) == int'(SECTOR_BYTES) - 1) begin
          k_byte <= '0;
          k_cnt  <= k_cnt + 1'b1;
        end else begin
          k_byte <= k_byte + 1'b1;
        end
      end
      inflight <= cons_issue;
      if (inflight) q_data[q_head ^ q_cnt[0]] <= rd_data;
      if (cons_pop) q_head <= ~q_head;
      q_cnt <= q_cnt + {1'b0, inflight} - {1'b0, cons_pop};
    end
  end

  initial assert (NBUF >= 2 && (NBUF & (NBUF - 1)) == 0) else $error("NBUF must be a power of two >= 2");
endmodule
