// sine_rom: read-only table of one quarter of a sine period.
//
// 2^AW entries of DW bits, loaded from INIT_FILE (hex, one word per line) and
// read synchronously: data appears one clock after addr, as in an FPGA block
// RAM. The synthesizer uses two instances: table A holds
// round(65535*sin(i*pi/1024)) at address i, table B holds entry i+1 at address
// i, so that both neighbours needed for linear interpolation (including
// sin(pi/2) after the last entry) are read with one address in one cycle.
// The 512 x 16-bit quarter table follows the design description; the split into
// an "A" and a shifted "B" table is this implementation's reading of the two
// ROMs of the block diagram.
module sine_rom #(
  parameter int unsigned AW        = 9,
  parameter int unsigned DW        = 16,
  parameter string       INIT_FILE = "rtl/sine_rom_a.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] mem [2**AW];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) data <= mem[addr];
endmodule
