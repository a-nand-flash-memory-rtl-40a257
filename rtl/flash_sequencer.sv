// flash_sequencer: dual-channel NAND flash bus sequencer.
//
// Executes one flash operation at a time (nfc_pkg::flash_op_e) on two x8 NAND
// chips run in lockstep: command and address cycles go to both chips, data
// bytes alternate (even byte -> channel 0, odd byte -> channel 1), so one
// strobe carries two bytes and the flash side keeps up with one byte per
// clock on the internal mass data bus. This is how the dual-channel access
// doubles the flash-side transfer rate.
//
// A read or program moves cmd.nsec+1 sectors of one page pair: the page is
// read into (or programmed from) the chips' page registers once, and the
// sectors follow each other at consecutive columns, each with its own ECC
// codeword. Whole-page operations spread the array time (tR, tPROG) over up
// to eight sectors; the sector count in the command is this design's choice.
//
// Sector format: SECTOR_BYTES data bytes, then the BCH parity
// (PAR_BYTES bytes, from bch_ecc), then filler bytes 0xFF up to an even count;
// each chip thus holds half of every sector and half of its parity, starting
// at the given column. On a program the data bytes are taken from the buffer
// manager (tx stream) and fed to the ECC encoder as they pass; on a read the
// bytes go to the buffer manager (rx stream, data only) and to the ECC
// syndrome generator (data and parity), with dec_last on the last parity byte.
// Program and erase end with a status read; status_fail has one bit per chip.
//
// Bus timing (this design's choice, for a clock up to about 50 MHz): WE# and
// RE# are low for one clock and high for one clock; read data is sampled at
// the clock edge that ends RE# low. After the confirm command the sequencer
// waits TWB_CLKS clocks, then until both R/B# are high (two-flop synchroniser).
// All flash pins are driven from registers.
//
// Handshake: cmd is accepted when cmd_valid and cmd_ready are both high;
// done pulses when the operation ends. A read waits before starting until the
// ECC decoder is idle and the buffer manager can take data (rx_ready).
module flash_sequencer
  import nfc_pkg::*;
#(
  parameter int unsigned SECTOR_BYTES = 512,
  parameter int unsigned PAR_BYTES    = 7,
  parameter int unsigned TWB_CLKS     = 5,
  localparam int unsigned XFER_BYTES  = ((SECTOR_BYTES + PAR_BYTES + 1) / 2) * 2,
  localparam int unsigned NW          = $clog2(XFER_BYTES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // operation request
  input  logic                   cmd_valid,
  input  flash_cmd_t             cmd,
  output logic                   cmd_ready,
  output logic                   done,
  output logic [NCH-1:0]         status_fail,
  // data from the buffer (program)
  input  logic                   tx_valid,
  input  logic [7:0]             tx_data,
  output logic                   tx_ready,
  // data to the buffer (read)
  output logic                   rx_valid,
  output logic [7:0]             rx_data,
  input  logic                   rx_ready,
  // ECC
  output logic                   enc_start,
  output logic                   enc_valid,
  output logic [7:0]             enc_data,
  input  logic [PAR_BYTES*8-1:0] parity_words,
  output logic                   dec_start,
  output logic                   dec_valid,
  output logic [7:0]             dec_data,
  output logic                   dec_last,
  input  logic                   dec_busy,
  // NAND flash pins (shared control, one data bus and CE#/R/B# per channel)
  output logic [NCH-1:0]         ce_n,
  output logic                   cle,
  output logic                   ale,
  output logic                   we_n,
  output logic                   re_n,
  output logic                   io_oe,
  output logic [7:0]             io_out [NCH],
  input  logic [7:0]             io_in  [NCH],
  input  logic [NCH-1:0]         rb_n
);
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_RD, S_CMD1, S_ADDR, S_CMD2, S_WB, S_RB,
    S_DOUT, S_DIN, S_STAT_CMD, S_STAT_RD, S_DONE,
    S_NEXT_W, S_NEXT_W2, S_NEXT_R
  } state_e;

  state_e      state;
  flash_cmd_t  cur;
  logic        ph;              // strobe phase: 0 = may start, 1 = strobe low
  logic [1:0]  acnt;            // address cycle index
  logic [7:0]  wcnt;            // tWB counter
  logic [2:0]  sec;             // sector within a multi-sector operation
  logic [NCH-1:0] rb_s1, rb_s2; // R/B# synchroniser

  // ---- program data pipeline ----
  logic [NW-1:0] src_n;         // next source byte index
  logic [7:0]    nxt [2];
  logic [1:0]    nxt_cnt;
  logic [NW-1:0] pairs;         // strobes issued
  logic          par_ok;        // parity register holds the final value
  logic          src_is_data, src_avail, collect, take;
  logic [7:0]    src_byte;

  // ---- read data pipeline ----
  logic [NW-1:0] in_n;          // index of the byte in pend[0]
  logic [7:0]    pend [2];
  logic [1:0]    pend_cnt;
  logic [NW-1:0] rd_pairs;      // strobes issued

  function automatic logic [7:0] cmd_byte1(flash_op_e op);
    unique case (op)
      OP_READ:    return CMD_READ1;
      OP_PROGRAM: return CMD_PROG1;
      OP_ERASE:   return CMD_ERASE1;
      default:    return CMD_RESET;
    endcase
  endfunction

  function automatic logic [7:0] cmd_byte2(flash_op_e op);
    unique case (op)
      OP_READ:    return CMD_READ2;
      OP_PROGRAM: return CMD_PROG2;
      default:    return CMD_ERASE2;
    endcase
  endfunction

  function automatic logic [7:0] addr_byte(flash_cmd_t c, logic [1:0] i);
    if (c.op == OP_ERASE) return i[0] ? c.row[15:8] : c.row[7:0];
    unique case (i)
      2'd0:    return c.col[7:0];
      2'd1:    return {4'h0, c.col[11:8]};
      2'd2:    return c.row[7:0];
      default: return c.row[15:8];
    endcase
  endfunction

  assign cmd_ready = (state == S_IDLE);

  // program source: data bytes from the buffer, then parity, then filler
  assign src_is_data = (int'(src_n) < int'(SECTOR_BYTES));
  assign src_avail   = src_is_data ? tx_valid : (par_ok || int'(src_n) >= int'(SECTOR_BYTES + PAR_BYTES));
  always_comb begin
    src_byte = 8'hFF;
    if (src_is_data) src_byte = tx_data;
    else if (int'(src_n) < int'(SECTOR_BYTES + PAR_BYTES))
      src_byte = parity_words[(PAR_BYTES*8-1) - 8*(int'(src_n) - int'(SECTOR_BYTES)) -: 8];
  end
  assign take     = (state == S_DOUT) && !ph && (nxt_cnt == 2'd2);
  assign collect  = (state == S_DOUT) && (int'(src_n) < int'(XFER_BYTES)) && src_avail &&
                    (nxt_cnt != 2'd2 || take);
  assign tx_ready = collect && src_is_data;
  assign enc_valid = tx_valid && tx_ready;
  assign enc_data  = tx_data;

  // read outputs: pend[0] is presented for one clock per byte
  assign rx_valid  = (state == S_DIN) && (pend_cnt != 0) && (int'(in_n) < int'(SECTOR_BYTES));
  assign rx_data   = pend[0];
  assign dec_valid = (state == S_DIN) && (pend_cnt != 0) && (int'(in_n) < int'(SECTOR_BYTES + PAR_BYTES));
  assign dec_data  = pend[0];
  assign dec_last  = dec_valid && (int'(in_n) == int'(SECTOR_BYTES + PAR_BYTES) - 1);

  // bytes left in pend after this clock's output
  logic [1:0] cnt_after;
  assign cnt_after = (pend_cnt != 2'd0) ? pend_cnt - 2'd1 : 2'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_s1 <= '1;
      rb_s2 <= '1;
    end else begin
      rb_s1 <= rb_n;
      rb_s2 <= rb_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur <= '0;
      ph <= 1'b0; acnt <= '0; wcnt <= '0; sec <= '0;
      ce_n <= '1; cle <= 1'b0; ale <= 1'b0; we_n <= 1'b1; re_n <= 1'b1; io_oe <= 1'b0;
      for (int c = 0; c < NCH; c++) io_out[c] <= '0;
      src_n <= '0; nxt[0] <= '0; nxt[1] <= '0; nxt_cnt <= '0; pairs <= '0; par_ok <= 1'b0;
      in_n <= '0; pend[0] <= '0; pend[1] <= '0; pend_cnt <= '0; rd_pairs <= '0;
      done <= 1'b0; status_fail <= '0;
      enc_start <= 1'b0; dec_start <= 1'b0;
    end else begin
      done <= 1'b0;
      enc_start <= 1'b0;
      dec_start <= 1'b0;
      we_n <= 1'b1;
      re_n <= 1'b1;
      // CLE and ALE are held one clock past the WE# rising edge and dropped
      // when a state that does not use them starts
      if (!(state inside {S_CMD1, S_CMD2, S_STAT_CMD, S_ADDR})) begin
        cle <= 1'b0;
        ale <= 1'b0;
      end
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur <= cmd;
          ce_n <= '0;
          ph <= 1'b0; acnt <= '0; sec <= '0;
          src_n <= '0; nxt_cnt <= '0; pairs <= '0; par_ok <= 1'b0;
          in_n <= '0; pend_cnt <= '0; rd_pairs <= '0;
          status_fail <= '0;
          if (cmd.op == OP_PROGRAM) enc_start <= 1'b1;
          state <= (cmd.op == OP_READ) ? S_WAIT_RD : S_CMD1;
        end
        S_WAIT_RD: if (!dec_busy && rx_ready) begin
          dec_start <= 1'b1;
          state <= S_CMD1;
        end
        S_CMD1, S_CMD2, S_STAT_CMD: begin
          if (!ph) begin
            cle <= 1'b1; ale <= 1'b0; io_oe <= 1'b1; we_n <= 1'b0;
            for (int c = 0; c < NCH; c++)
              io_out[c] <= (state == S_CMD1) ? cmd_byte1(cur.op) :
                           (state == S_CMD2) ? cmd_byte2(cur.op) : CMD_STATUS;
            ph <= 1'b1;
          end else begin
            ph <= 1'b0;   // CLE stays high past the WE# rising edge
            unique case (state)
              S_CMD1:  state <= (cur.op == OP_RESET) ? S_WB : S_ADDR;
              S_CMD2:  state <= (cur.op == OP_PROGRAM || cur.op == OP_ERASE || cur.op == OP_READ) ? S_WB : S_DONE;
              default: begin state <= S_STAT_RD; io_oe <= 1'b0; end
            endcase
            wcnt <= '0;
          end
        end
        S_ADDR: begin
          if (!ph) begin
            ale <= 1'b1; cle <= 1'b0; io_oe <= 1'b1; we_n <= 1'b0;
            for (int c = 0; c < NCH; c++) io_out[c] <= addr_byte(cur, acnt);
            ph <= 1'b1;
          end else begin
            ph <= 1'b0;
            acnt <= acnt + 1'b1;
            if ((cur.op == OP_ERASE && acnt == 2'd1) || acnt == 2'd3) begin
              state <= (cur.op == OP_PROGRAM) ? S_DOUT : S_CMD2;
            end
          end
        end
        S_WB: begin
          io_oe <= 1'b0;
          wcnt <= wcnt + 1'b1;
          if (int'(wcnt) >= int'(TWB_CLKS)) state <= S_RB;
        end
        S_RB: if (&rb_s2) begin
          unique case (cur.op)
            OP_READ:             state <= S_DIN;
            OP_PROGRAM, OP_ERASE: state <= S_STAT_CMD;
            default:             state <= S_DONE;
          endcase
        end
        S_DOUT: begin
          // collector
          if (collect) begin
            src_n <= src_n + 1'b1;
            if (take) begin
              nxt[0] <= src_byte;
              nxt_cnt <= 2'd1;
            end else begin
              nxt[nxt_cnt[0]] <= src_byte;
              nxt_cnt <= nxt_cnt + 1'b1;
            end
          end else if (take) begin
            nxt_cnt <= 2'd0;
          end
          // parity is final the clock after the last data byte was fed
          if (enc_valid && int'(src_n) == int'(SECTOR_BYTES) - 1) par_ok <= 1'b1;
          // driver
          if (take) begin
            io_oe <= 1'b1; we_n <= 1'b0;
            for (int c = 0; c < NCH; c++) io_out[c] <= nxt[c];
            ph <= 1'b1;
            pairs <= pairs + 1'b1;
          end else if (ph) begin
            ph <= 1'b0;
            if (int'(pairs) == int'(XFER_BYTES) / 2)
              state <= (sec != cur.nsec) ? S_NEXT_W : S_CMD2;
          end
        end
        // next sector of a multi-sector program: restart the encoder (its
        // start clock carries no data), then stream on at the next column
        S_NEXT_W: begin
          enc_start <= 1'b1;
          sec <= sec + 1'b1;
          src_n <= '0; nxt_cnt <= '0; pairs <= '0; par_ok <= 1'b0;
          state <= S_NEXT_W2;
        end
        S_NEXT_W2: state <= S_DOUT;
        // next sector of a multi-sector read: wait as before the first one
        S_NEXT_R: if (!dec_busy && rx_ready) begin
          dec_start <= 1'b1;
          sec <= sec + 1'b1;
          in_n <= '0; pend_cnt <= '0; rd_pairs <= '0;
          state <= S_DIN;
        end
        S_DIN: begin
          // output side: shift pend, one byte per clock
          if (pend_cnt != 0) begin
            pend[0] <= pend[1];
            in_n <= in_n + 1'b1;
          end
          if (!ph) begin
            // start a strobe when at most one byte of the previous pair is
            // left: it is sent in the clock in which the new pair is sampled
            if (int'(rd_pairs) < int'(XFER_BYTES) / 2 && cnt_after <= 2'd1 &&
                (rx_ready || int'(in_n) + int'(pend_cnt) >= int'(SECTOR_BYTES))) begin
              re_n <= 1'b0;
              ph <= 1'b1;
              rd_pairs <= rd_pairs + 1'b1;
            end
            pend_cnt <= cnt_after;
            if (int'(rd_pairs) == int'(XFER_BYTES) / 2 && pend_cnt == 2'd0)
              state <= (sec != cur.nsec) ? S_NEXT_R : S_DONE;
          end else begin
            // sample at the end of RE# low
            ph <= 1'b0;
            pend[0] <= (cnt_after == 2'd0) ? io_in[0] : pend[1];
            pend[1] <= io_in[1];
            pend_cnt <= 2'd2;
          end
        end
        S_STAT_RD: begin
          if (!ph) begin
            re_n <= 1'b0;
            ph <= 1'b1;
          end else begin
            ph <= 1'b0;
            for (int c = 0; c < NCH; c++) status_fail[c] <= io_in[c][0];
            state <= S_DONE;
          end
        end
        S_DONE: begin
          ce_n <= '1;
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
