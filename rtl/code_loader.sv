// code_loader: copies a firmware image from the flash into the Common RAM or
// the Bank RAM.
//
// The flash keeps the common code and the code banks #0..#n in a reserved
// area. On start the loader reads the image sector by sector: it issues flash
// read operations itself (the flash sequencer's command port is given to it
// while busy) and takes the error-corrected bytes from the buffer manager's
// host-side read stream, writing them into the selected RAM at increasing
// addresses. Several sector reads are in flight at once; the buffer manager's
// ring keeps them in order. An uncorrectable ECC result during the load sets
// error. busy is high from start to done; done pulses at the end.
//
// Flash layout (this design's choice): the common image starts at page
// COMMON_ROW, bank k at BANK_ROW0 + k * ROWS_PER_BANK; each page pair holds
// SECT_PER_PAGE sectors at a column stride of COL_STRIDE bytes per chip
// (256 data + 4 parity bytes per chip for a 512-byte sector).
module code_loader
  import nfc_pkg::*;
#(
  parameter int unsigned SECTOR_BYTES  = 512,
  parameter int unsigned COMMON_BYTES  = 8192,
  parameter int unsigned BANK_BYTES    = 8192,
  parameter int unsigned SECT_PER_PAGE = 8,
  parameter int unsigned COL_STRIDE    = 260,
  parameter logic [15:0] COMMON_ROW    = 16'h0040,
  parameter logic [15:0] BANK_ROW0     = 16'h0080,
  localparam int unsigned MAXB         = (COMMON_BYTES > BANK_BYTES) ? COMMON_BYTES : BANK_BYTES,
  localparam int unsigned AW           = $clog2(MAXB),
  localparam int unsigned ROWS_PER_BANK =
      (BANK_BYTES / SECTOR_BYTES + SECT_PER_PAGE - 1) / SECT_PER_PAGE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          target,      // 0: common code -> Common RAM, 1: bank -> Bank RAM
  input  logic [7:0]    bank_no,
  output logic          busy,
  output logic          done,
  output logic          error,
  // flash sequencer command port
  output logic          cmd_valid,
  output flash_cmd_t    cmd,
  input  logic          cmd_ready,
  input  logic          ecc_done,
  input  logic          ecc_uncorrectable,
  // corrected data from the buffer manager
  input  logic          in_valid,
  input  logic [7:0]    in_data,
  output logic          in_ready,
  // RAM write port (mass data bus)
  output logic          common_we,
  output logic          bank_we,
  output logic [AW-1:0] ram_addr,
  output logic [7:0]    ram_wdata
);
  localparam int unsigned SW = $clog2(MAXB / SECTOR_BYTES + 1);

  logic          tgt;
  logic [7:0]    bank;
  logic [SW-1:0] issued, nsect;
  logic [AW:0]   written, total;

  assign nsect = tgt ? SW'(BANK_BYTES / SECTOR_BYTES) : SW'(COMMON_BYTES / SECTOR_BYTES);
  assign total = tgt ? (AW+1)'(BANK_BYTES) : (AW+1)'(COMMON_BYTES);

  always_comb begin
    logic [15:0] base;
    base = tgt ? BANK_ROW0 + 16'(int'(bank) * int'(ROWS_PER_BANK)) : COMMON_ROW;
    cmd.op  = OP_READ;
    cmd.row = base + 16'(int'(issued) / int'(SECT_PER_PAGE));
    cmd.col = 12'((int'(issued) % int'(SECT_PER_PAGE)) * int'(COL_STRIDE));
    cmd.nsec = '0;
  end

  assign cmd_valid = busy && (issued != nsect);
  assign in_ready  = busy;
  assign ram_wdata = in_data;
  assign ram_addr  = AW'(written);
  assign common_we = busy && in_valid && !tgt;
  assign bank_we   = busy && in_valid &&  tgt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; error <= 1'b0;
      tgt <= 1'b0; bank <= '0; issued <= '0; written <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; error <= 1'b0;
          tgt <= target; bank <= bank_no;
          issued <= '0; written <= '0;
        end
      end else begin
        if (cmd_valid && cmd_ready) issued <= issued + 1'b1;
        if (ecc_done && ecc_uncorrectable) error <= 1'b1;
        if (in_valid) begin
          written <= written + 1'b1;
          if (written == total - 1'b1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
