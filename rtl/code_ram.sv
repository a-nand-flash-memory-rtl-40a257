// code_ram: program RAM of the code-banking scheme; the controller uses two,
// the Common RAM (firmware that is always resident) and the Bank RAM (the
// bank of firmware currently loaded).
//
// The write port is on the mass data bus and is driven by the code loader as
// it copies code from flash; the read port is on the MCU program bus. Both
// are synchronous; read data appears one clock after the address. A write and
// a read of the same address in one clock return the old byte.
module code_ram #(
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
