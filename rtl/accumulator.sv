// accumulator: sums the component samples of one output sample.
//
// A component sample marked first replaces the running sum, the others are
// added to it; when the sample marked last has been added the sum is
// presented for one cycle (out_valid) and the next frame starts from zero.
// The sum is kept ACC_W bits wide (no overflow for 2^(ACC_W-IN_W) components)
// and saturated to OUT_W bits on output, with clipped set for that sample.
// out_valid follows the last in_valid by 1 cycle. Accumulation and the reset
// to zero per output sample follow the design description; the wide sum and
// the saturation are this implementation's choice.
module accumulator #(
  parameter int unsigned IN_W  = 25,
  parameter int unsigned OUT_W = 25,
  parameter int unsigned ACC_W = 33
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [IN_W-1:0]   x,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  y,
  output logic                     clipped
);
  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (OUT_W-1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -MAXV - 1;

  logic signed [ACC_W-1:0] acc, acc_next;

  assign acc_next = (first ? '0 : acc) + ACC_W'(x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
      clipped   <= 1'b0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        acc <= acc_next;
        if (last) begin
          if (acc_next > MAXV) begin
            y <= OUT_W'(MAXV); clipped <= 1'b1;
          end else if (acc_next < MINV) begin
            y <= OUT_W'(MINV); clipped <= 1'b1;
          end else begin
            y <= OUT_W'(acc_next); clipped <= 1'b0;
          end
        end
      end
    end
  end
endmodule
