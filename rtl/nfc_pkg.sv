// nfc_pkg: shared types and constants of the NAND flash controller.
//
// The flash side follows the usual x8 large-page NAND command set (page read
// 00h/30h, page program 80h/10h, block erase 60h/D0h, read status 70h,
// reset FFh) with two column and two row address cycles, as used by 1 Gbit
// x8 parts. Two chips are run as two channels in lockstep: commands and
// addresses go to both, data bytes alternate between them (even bytes on
// channel 0, odd bytes on channel 1), so each write or read strobe moves two
// bytes.
package nfc_pkg;

  typedef enum logic [2:0] {
    OP_READ    = 3'd0,   // read one sector (data + ECC parity) into the buffer
    OP_PROGRAM = 3'd1,   // program one sector from the buffer, parity appended
    OP_ERASE   = 3'd2,   // erase the block holding the row address
    OP_RESET   = 3'd3    // reset both chips
  } flash_op_e;

  localparam logic [7:0] CMD_READ1  = 8'h00;
  localparam logic [7:0] CMD_READ2  = 8'h30;
  localparam logic [7:0] CMD_PROG1  = 8'h80;
  localparam logic [7:0] CMD_PROG2  = 8'h10;
  localparam logic [7:0] CMD_ERASE1 = 8'h60;
  localparam logic [7:0] CMD_ERASE2 = 8'hD0;
  localparam logic [7:0] CMD_STATUS = 8'h70;
  localparam logic [7:0] CMD_RESET  = 8'hFF;

  localparam int unsigned NCH = 2;   // flash channels

  // A flash operation as the MCU (or the code loader) issues it.
  typedef struct packed {
    flash_op_e   op;
    logic [15:0] row;   // page address (same on both chips)
    logic [11:0] col;   // byte column within each chip's page
    logic [2:0]  nsec;  // read/program: sectors in the operation minus one
  } flash_cmd_t;

endpackage
