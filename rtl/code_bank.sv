// code_bank: the code-banking unit, which lets a small on-chip program memory
// run a firmware larger than itself, and lets that firmware be replaced.
//
// The MCU program bus reads from three memories: the Boot ROM (boot code), the
// Common RAM (code that is always resident) and the Bank RAM (one bank of
// code, #0..#n, at a time). The firmware is kept in the flash; the code loader
// copies the common code and, on request, bank #k into the RAMs. Because the
// firmware lives in flash, it can be upgraded from the host (in-system
// programming) by rewriting that flash area, and a firmware build matching
// the flash part in use can be loaded.
//
// Program address map (this design's choice; 16-bit MCU code space):
//   0x0000-0x7FFF  Boot ROM while boot_mode is set (after reset), Common RAM
//                  after the MCU clears boot_mode (boot_mode_clr pulse)
//   0x8000-0xFFFF  Bank RAM
// Addresses beyond a memory's size wrap within it. prog_rdata follows
// prog_addr by one clock. Loader handshakes are as in code_loader.
module code_bank
  import nfc_pkg::*;
#(
  parameter int unsigned BOOT_BYTES    = 4096,
  parameter string       BOOT_INIT     = "",
  parameter int unsigned COMMON_BYTES  = 8192,
  parameter int unsigned BANK_BYTES    = 8192,
  parameter int unsigned SECTOR_BYTES  = 512,
  localparam int unsigned LAW = $clog2((COMMON_BYTES > BANK_BYTES) ? COMMON_BYTES : BANK_BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  // MCU program bus
  input  logic [15:0] prog_addr,
  output logic [7:0]  prog_rdata,
  output logic        boot_mode,
  input  logic        boot_mode_clr,
  // MCU requests to the loader
  input  logic        load_start,
  input  logic        load_target,
  input  logic [7:0]  load_bank,
  output logic        load_busy,
  output logic        load_done,
  output logic        load_error,
  // loader to flash sequencer / buffer manager
  output logic        cmd_valid,
  output flash_cmd_t  cmd,
  input  logic        cmd_ready,
  input  logic        ecc_done,
  input  logic        ecc_uncorrectable,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready
);
  localparam int unsigned BAW = $clog2(BOOT_BYTES);
  localparam int unsigned CAW = $clog2(COMMON_BYTES);
  localparam int unsigned KAW = $clog2(BANK_BYTES);

  logic           common_we, bank_we;
  logic [LAW-1:0] ram_addr;
  logic [7:0]     ram_wdata;
  logic [7:0]     boot_q, common_q, bank_q;
  typedef enum logic [1:0] {SEL_BOOT, SEL_COMMON, SEL_BANK} sel_e;
  sel_e sel, sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             boot_mode <= 1'b1;
    else if (boot_mode_clr) boot_mode <= 1'b0;
  end

  always_comb begin
    if (prog_addr[15])  sel = SEL_BANK;
    else if (boot_mode) sel = SEL_BOOT;
    else                sel = SEL_COMMON;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= SEL_BOOT;
    else        sel_q <= sel;
  end

  boot_rom #(.DEPTH(BOOT_BYTES), .INIT_FILE(BOOT_INIT)) u_boot_rom (
    .clk, .en(sel == SEL_BOOT), .addr(prog_addr[BAW-1:0]), .rdata(boot_q)
  );

  code_ram #(.DEPTH(COMMON_BYTES)) u_common_ram (
    .clk, .we(common_we), .waddr(ram_addr[CAW-1:0]), .wdata(ram_wdata),
    .re(sel == SEL_COMMON), .raddr(prog_addr[CAW-1:0]), .rdata(common_q)
  );

  code_ram #(.DEPTH(BANK_BYTES)) u_bank_ram (
    .clk, .we(bank_we), .waddr(ram_addr[KAW-1:0]), .wdata(ram_wdata),
    .re(sel == SEL_BANK), .raddr(prog_addr[KAW-1:0]), .rdata(bank_q)
  );

  always_comb begin
    unique case (sel_q)
      SEL_BOOT:   prog_rdata = boot_q;
      SEL_COMMON: prog_rdata = common_q;
      default:    prog_rdata = bank_q;
    endcase
  end

  code_loader #(
    .SECTOR_BYTES(SECTOR_BYTES), .COMMON_BYTES(COMMON_BYTES), .BANK_BYTES(BANK_BYTES)
  ) u_loader (
    .clk, .rst_n, .start(load_start), .target(load_target), .bank_no(load_bank),
    .busy(load_busy), .done(load_done), .error(load_error),
    .cmd_valid, .cmd, .cmd_ready, .ecc_done, .ecc_uncorrectable,
    .in_valid, .in_data, .in_ready,
    .common_we, .bank_we, .ram_addr, .ram_wdata
  );
endmodule
