// delay_line: delays a W-bit bus by DEPTH clock cycles with a chain of
// registers (DEPTH = 0 is a wire). Used to carry side information (valid,
// sign, amplitude, frame markers) alongside the synthesizer pipeline.
// No reset: the pipeline's valid bits are delayed by a separately reset chain.
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
    end
    assign q = r[DEPTH-1];
  end
endmodule
