// param_ram: memory of one synthesis parameter (amplitude, frequency or phase)
// for every component.
//
// Simple dual-port RAM on one clock: the write port is driven by the control
// FSM, the read port by the synthesizer, with data one clock after raddr. A
// read and a write to the same address in one cycle return the old value.
// The contents start at zero, as FPGA block RAM does after configuration, so
// components never written are silent. Three such memories, one per
// parameter, follow the design description; the port structure and the zero
// start are this implementation's choices.
module param_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 19,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
