// interpolator: linear interpolation between two neighbouring table samples.
//
// y = a * 2^FRAC_W + (b - a) * frac, with frac in 0 .. 2^FRAC_W. For 16-bit
// samples and an 8-bit fraction this is the 24-bit interpolated magnitude (16
// integer and 8 fraction bits). Three register stages, in the style of an FPGA
// multiplier block: difference, product, final sum. out_valid and y follow
// in_valid by 3 cycles; a new input can be taken every cycle.
// Linear interpolation and the 16 -> 24 bit widths follow the design
// description; the pipeline split is this implementation's choice.
module interpolator #(
  parameter int unsigned DW     = 16,
  parameter int unsigned FRAC_W = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [DW-1:0]          a,
  input  logic [DW-1:0]          b,
  input  logic [FRAC_W:0]        frac,
  output logic                   out_valid,
  output logic [DW+FRAC_W-1:0]   y
);
  logic signed [DW:0]          s1_diff;
  logic        [FRAC_W:0]      s1_frac;
  logic        [DW-1:0]        s1_a, s2_a;
  logic signed [DW+FRAC_W+1:0] s2_prod;
  logic        [1:0]           vpipe;

  always_ff @(posedge clk) begin
    s1_diff <= $signed({1'b0, b}) - $signed({1'b0, a});
    s1_frac <= frac;
    s1_a    <= a;
    s2_prod <= s1_diff * $signed({1'b0, s1_frac});
    s2_a    <= s1_a;
    y       <= (DW+FRAC_W)'($signed({2'b00, s2_a, FRAC_W'(0)}) + s2_prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {out_valid, vpipe} <= '0;
    else        {out_valid, vpipe} <= {vpipe, in_valid};
  end
endmodule
