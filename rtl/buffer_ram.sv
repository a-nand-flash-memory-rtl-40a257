// buffer_ram: the controller's data buffer, NBUF sector buffers of
// SECTOR_BYTES bytes in one true dual-port RAM.
//
// Port A serves the host side (SD/MMC data and ECC write-back), port B the
// flash side, so a sector can move between host and buffer while another
// moves between buffer and flash. Each port does one read or one write per
// clock; reads are synchronous (data one clock after the address). The two
// ports must not write the same address in the same clock; the buffer
// manager never lets them touch the same buffer. Written as an array so that
// synthesis maps it to a RAM macro. The document names the block only; the
// size (4 x 512 bytes) and the two ports are this design's choice.
module buffer_ram #(
  parameter int unsigned NBUF         = 4,
  parameter int unsigned SECTOR_BYTES = 512,
  localparam int unsigned DEPTH       = NBUF * SECTOR_BYTES,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [7:0]    a_wdata,
  output logic [7:0]    a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [7:0]    b_wdata,
  output logic [7:0]    b_rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end
endmodule
