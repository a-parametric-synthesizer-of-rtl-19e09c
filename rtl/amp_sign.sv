// amp_sign: scales the interpolated magnitude by the component's amplitude and
// applies the sign of its quarter.
//
// y = +/- ((mag * amp) >> AMP_W): the amplitude is an unsigned fraction
// (amp / 2^AMP_W), so a 24-bit magnitude stays within 24 bits and the signed
// result is 25 bits. Two register stages (product, sign); out_valid and y
// follow in_valid by 2 cycles. The 24 -> 25 bit widths follow the design
// description; the amplitude format and the truncation are this
// implementation's choices. The low AMP_W bits of the product are dropped on
// purpose (truncation), which lint reports as unused bits.
module amp_sign #(
  parameter int unsigned MAG_W = 24,
  parameter int unsigned AMP_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [MAG_W-1:0]          mag,
  input  logic [AMP_W-1:0]          amp,
  input  logic                      neg,
  output logic                      out_valid,
  output logic signed [MAG_W:0]     y
);
  logic [MAG_W+AMP_W-1:0] prod;
  logic [MAG_W-1:0]       s1_mag;
  logic                   s1_neg, s1_valid;
  logic signed [MAG_W:0]  scaled;

  always_ff @(posedge clk) begin
    s1_mag  <= prod[MAG_W+AMP_W-1:AMP_W];
    s1_neg  <= neg;
    y       <= s1_neg ? -scaled : scaled;
  end
  assign prod   = (MAG_W+AMP_W)'(mag) * (MAG_W+AMP_W)'(amp);
  assign scaled = $signed({1'b0, s1_mag});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {out_valid, s1_valid} <= '0;
    else        {out_valid, s1_valid} <= {s1_valid, in_valid};
  end
endmodule
