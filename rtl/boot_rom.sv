// boot_rom: the MCU's boot ROM, a mask ROM on the MCU program bus.
//
// It holds the boot code that runs after reset, before any firmware has been
// loaded from flash into the common and bank RAMs. It is written as an array
// initialised from INIT_FILE (hex, one byte per line) so that synthesis can map
// it to a ROM; the boot program itself is firmware and is supplied with the
// chip, not by this RTL. Read is synchronous: data one clock after the
// address. Size (4 KB) is this design's choice.
module boot_rom #(
  parameter int unsigned DEPTH     = 4096,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);
  logic [7:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = 8'h00;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= rom[addr];
  end
endmodule
