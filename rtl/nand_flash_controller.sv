// nand_flash_controller: NAND flash controller for an SD/MMC memory card.
//
// The controller moves 512-byte sectors between the card's host bus and two
// x8 NAND flash chips, protecting every sector with a 4-error-correcting BCH
// code. Its parts:
//   - buffer_ram + buffer_manager: a ring of sector buffers (multi-buffering)
//     so the host side and the flash side work on different sectors at once;
//   - flash_sequencer: runs page read / program / erase on the two chips as two
//     lockstep channels (two bytes per strobe: dual-channel access);
//   - bch_ecc: w-bit parallel BCH encoder, syndrome generator and decoder on the
//     mass data path, correcting up to 4 bit errors per sector in the buffer;
//   - code_bank: Boot ROM, Common RAM, Bank RAM and the code loader, so that the
//     MCU firmware is kept in (and upgradable in) flash and loaded bank by bank;
//   - flash_param_parser: reads the flash parameter table from a sector.
// The SD/MMC bus decoder and the MCU are outside this RTL: the host-side
// sector streams and the MCU's control, status and program-bus signals are
// ports. Flash pins are split into out/in/enable for an external pad ring.
//
// Port groups and timing:
//   host_wr_* / host_rd_*  byte streams, valid/ready, one byte per clock max.
//   mcu_cmd_*              one flash operation (nfc_pkg::flash_cmd_t) at a time;
//                          a read or program moves nsec+1 sectors of one page;
//                          flash_done pulses at its end with flash_status_fail.
//   mcu_mode               buffer direction (0 host->flash, 1 flash->host);
//                          changing it or mcu_flush empties the buffers.
//   ecc_*                  per read sector: ecc_done pulse, number of errors,
//                          uncorrectable flag; corrections are already applied.
//   prog_addr/prog_rdata   MCU program bus, data one clock after the address.
//   load_*                 code loader; while load_busy it owns the flash command
//                          port and the buffer's host-side read stream and the
//                          buffers run in read direction.
//   param_capture          while high, the buffer's host-side read stream goes
//                          to the parameter table reader instead of the host.
module nand_flash_controller
  import nfc_pkg::*;
#(
  parameter int unsigned NBUF          = 4,
  parameter int unsigned SECTOR_BYTES  = 512,
  parameter int unsigned BOOT_BYTES    = 4096,
  parameter string       BOOT_INIT     = "",
  parameter int unsigned COMMON_BYTES  = 8192,
  parameter int unsigned BANK_BYTES    = 8192,
  localparam int unsigned CW           = $clog2(NBUF) + 2,
  localparam int unsigned PAR_BYTES    = (bch_pkg::GF_M * bch_pkg::BCH_T + 7) / 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side (SD/MMC decoder)
  input  logic            host_wr_valid,
  input  logic [7:0]      host_wr_data,
  output logic            host_wr_ready,
  output logic            host_rd_valid,
  output logic [7:0]      host_rd_data,
  input  logic            host_rd_ready,
  // MCU data and control
  input  logic            mcu_mode,
  input  logic            mcu_flush,
  input  logic            mcu_cmd_valid,
  input  flash_cmd_t      mcu_cmd,
  output logic            mcu_cmd_ready,
  output logic            flash_done,
  output logic [NCH-1:0]  flash_status_fail,
  output logic [CW-1:0]   free_bufs,
  output logic [CW-1:0]   ready_secs,
  output logic            ecc_done,
  output logic [3:0]      ecc_nerr,
  output logic            ecc_uncorrectable,
  output logic            ecc_synd_nonzero,   // the sector just read had errors
  // MCU program bus and code banking
  input  logic [15:0]     prog_addr,
  output logic [7:0]      prog_rdata,
  output logic            boot_mode,
  input  logic            boot_mode_clr,
  input  logic            load_start,
  input  logic            load_target,
  input  logic [7:0]      load_bank,
  output logic            load_busy,
  output logic            load_done,
  output logic            load_error,
  // flash parameter table
  input  logic            param_capture,
  input  logic            param_clear,
  output logic            param_valid,
  output logic [31:0]     total_capacity,
  output logic [31:0]     total_blocks,
  output logic [31:0]     pages_per_block,
  // flash memory bus
  output logic [NCH-1:0]  flash_ce_n,
  output logic            flash_cle,
  output logic            flash_ale,
  output logic            flash_we_n,
  output logic            flash_re_n,
  output logic            flash_io_oe,
  output logic [7:0]      flash_io_out [NCH],
  input  logic [7:0]      flash_io_in  [NCH],
  input  logic [NCH-1:0]  flash_rb_n
);
  localparam int unsigned AW    = $clog2(NBUF * SECTOR_BYTES);
  localparam int unsigned IDX_W = $clog2(SECTOR_BYTES + PAR_BYTES);

  // ---------------- buffer RAM and manager ----------------
  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [7:0]    a_wdata, a_rdata, b_wdata, b_rdata;
  logic          buf_mode;
  logic          hr_valid, hr_ready;
  logic [7:0]    hr_data;
  logic          ft_valid, ft_ready, fr_valid, fr_ready;
  logic [7:0]    ft_data, fr_data;
  logic          err_valid, err_ready;
  logic [IDX_W-1:0] err_index;
  logic [7:0]    err_mask;

  buffer_ram #(.NBUF(NBUF), .SECTOR_BYTES(SECTOR_BYTES)) u_buffer_ram (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  assign buf_mode = load_busy ? 1'b1 : mcu_mode;

  buffer_manager #(.NBUF(NBUF), .SECTOR_BYTES(SECTOR_BYTES), .IDX_W(IDX_W)) u_buffer_manager (
    .clk, .rst_n, .mode(buf_mode), .flush(mcu_flush),
    .hw_valid(host_wr_valid), .hw_data(host_wr_data), .hw_ready(host_wr_ready),
    .hr_valid, .hr_data, .hr_ready,
    .ft_valid, .ft_data, .ft_ready,
    .fr_valid, .fr_data, .fr_ready,
    .corr_valid(err_valid), .corr_index(err_index), .corr_mask(err_mask),
    .corr_ready(err_ready), .corr_done(ecc_done),
    .free_bufs, .ready_secs,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  // ---------------- ECC ----------------
  logic                   enc_start, enc_valid, dec_start, dec_valid, dec_last, dec_busy;
  logic [7:0]             enc_data, dec_data;
  logic [PAR_BYTES*8-1:0] parity_words;

  bch_ecc #(.DATA_WORDS(SECTOR_BYTES), .PAR_WORDS(PAR_BYTES)) u_bch_ecc (
    .clk, .rst_n,
    .enc_start, .enc_valid, .enc_data, .parity_words,
    .dec_start, .dec_valid, .dec_data, .dec_last, .dec_busy, .synd_nonzero(ecc_synd_nonzero),
    .err_valid, .err_index, .err_mask, .err_ready,
    .dec_done(ecc_done), .nerr(ecc_nerr), .uncorrectable(ecc_uncorrectable)
  );

  // ---------------- flash sequencer ----------------
  logic       seq_cmd_valid, seq_cmd_ready;
  flash_cmd_t seq_cmd;
  logic       ld_cmd_valid;
  flash_cmd_t ld_cmd;

  assign seq_cmd_valid = load_busy ? ld_cmd_valid : mcu_cmd_valid;
  assign seq_cmd       = load_busy ? ld_cmd       : mcu_cmd;
  assign mcu_cmd_ready = seq_cmd_ready && !load_busy;

  flash_sequencer #(.SECTOR_BYTES(SECTOR_BYTES), .PAR_BYTES(PAR_BYTES)) u_flash_sequencer (
    .clk, .rst_n,
    .cmd_valid(seq_cmd_valid), .cmd(seq_cmd), .cmd_ready(seq_cmd_ready),
    .done(flash_done), .status_fail(flash_status_fail),
    .tx_valid(ft_valid), .tx_data(ft_data), .tx_ready(ft_ready),
    .rx_valid(fr_valid), .rx_data(fr_data), .rx_ready(fr_ready),
    .enc_start, .enc_valid, .enc_data, .parity_words,
    .dec_start, .dec_valid, .dec_data, .dec_last, .dec_busy,
    .ce_n(flash_ce_n), .cle(flash_cle), .ale(flash_ale), .we_n(flash_we_n), .re_n(flash_re_n),
    .io_oe(flash_io_oe), .io_out(flash_io_out), .io_in(flash_io_in), .rb_n(flash_rb_n)
  );

  // ---------------- consumer of the buffer's host-side read stream ----------
  logic ld_in_ready;

  assign host_rd_valid = hr_valid && !load_busy && !param_capture;
  assign host_rd_data  = hr_data;
  always_comb begin
    if (load_busy)          hr_ready = ld_in_ready;
    else if (param_capture) hr_ready = 1'b1;
    else                    hr_ready = host_rd_ready;
  end

  // ---------------- code banking ----------------
  code_bank #(
    .BOOT_BYTES(BOOT_BYTES), .BOOT_INIT(BOOT_INIT),
    .COMMON_BYTES(COMMON_BYTES), .BANK_BYTES(BANK_BYTES), .SECTOR_BYTES(SECTOR_BYTES)
  ) u_code_bank (
    .clk, .rst_n,
    .prog_addr, .prog_rdata, .boot_mode, .boot_mode_clr,
    .load_start(load_start && !load_busy), .load_target, .load_bank,
    .load_busy, .load_done, .load_error,
    .cmd_valid(ld_cmd_valid), .cmd(ld_cmd), .cmd_ready(seq_cmd_ready),
    .ecc_done, .ecc_uncorrectable,
    .in_valid(hr_valid && load_busy), .in_data(hr_data), .in_ready(ld_in_ready)
  );

  // ---------------- flash parameter table ----------------
  flash_param_parser u_flash_param_parser (
    .clk, .rst_n, .clear(param_clear),
    .in_valid(hr_valid && param_capture && !load_busy), .in_data(hr_data),
    .table_valid(param_valid), .total_capacity, .total_blocks, .pages_per_block
  );
endmodule
