// i2s_serializer: sends samples in I2S (Philips) serial form to a stereo D/A
// converter.
//
// The bit clock is the master clock divided by MCLK_PER_BCLK; a frame has two
// SLOT_W-bit slots (left while lrck is low, then right), so with 12.288 MHz,
// 4 and 32 the frame rate is 48 kHz. Each slot carries the DW-bit sample MSB
// first, left-justified and padded with zeros; the MSB follows the lrck edge
// by one bit clock. bclk, lrck and sdata are registered together, so data and
// word select change on the falling edge of bclk and are stable at its rising
// edge. The mono sample goes to both slots. One clock before the left MSB a
// sample is taken (sample_ack pulses when sample_valid is high); with none
// available the frame is sent silent and underflow pulses.
// Conversion to I2S follows the design description; the I2S variant, slot
// width, clock ratio and mono-to-stereo use are this implementation's choices.
module i2s_serializer #(
  parameter int unsigned DW            = 25,
  parameter int unsigned SLOT_W        = 32,
  parameter int unsigned MCLK_PER_BCLK = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample_valid,
  input  logic [DW-1:0] sample,
  output logic          sample_ack,
  output logic          bclk,
  output logic          lrck,
  output logic          sdata,
  output logic          underflow
);
  localparam int unsigned FRAME_BITS = 2 * SLOT_W;
  localparam int unsigned BW = $clog2(FRAME_BITS);
  localparam int unsigned DIVW = (MCLK_PER_BCLK > 1) ? $clog2(MCLK_PER_BCLK) : 1;

  logic [DIVW-1:0]       div;
  logic [BW-1:0]         bitpos;   // bit slot now on the line
  logic [FRAME_BITS-1:0] shreg;
  logic                  fall, load;
  logic [SLOT_W-1:0]     word;

  assign fall = (div == DIVW'(MCLK_PER_BCLK - 1));
  assign load = fall && (bitpos == BW'(0));      // next slot is the left MSB
  assign sample_ack = load && sample_valid;
  assign word = sample_valid ? {sample, (SLOT_W-DW)'(0)} : '0;
  assign sdata = shreg[FRAME_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      bitpos    <= '0;
      bclk      <= 1'b0;
      lrck      <= 1'b0;
      shreg     <= '0;
      underflow <= 1'b0;
    end else begin
      underflow <= load && !sample_valid;
      if (fall) begin
        div    <= '0;
        bclk   <= 1'b0;
        bitpos <= bitpos + 1'b1;
        lrck   <= ((bitpos + 1'b1) >= BW'(SLOT_W));
        if (load) shreg <= {word, word};
        else      shreg <= shreg << 1;
      end else begin
        div <= div + 1'b1;
        if (div == DIVW'(MCLK_PER_BCLK / 2 - 1)) bclk <= 1'b1;
      end
    end
  end

  initial assert (MCLK_PER_BCLK >= 2 && MCLK_PER_BCLK % 2 == 0 && SLOT_W >= DW)
    else $error("i2s_serializer: bad configuration");
endmodule
