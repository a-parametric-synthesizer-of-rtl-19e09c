// i2s_monitor: testbench receiver for the I2S output.
//
// Samples sdata and lrck on rising bclk. The bit sampled at the first rising
// edge after an lrck change is the last bit of the slot just ended, so the
// 32 bits up to and including it form one word. When a right-channel word
// completes, frame pulses for one bclk period with both words in left/right.
// bits counts the bits of the last slot, for checking the slot length.
module i2s_monitor (
  input  logic        bclk,
  input  logic        lrck,
  input  logic        sdata,
  output logic        frame,
  output logic [31:0] left,
  output logic [31:0] right,
  output int          bits
);
  logic        prev = 1'b0;
  logic [31:0] sh = '0;
  int          n = 0;
  initial begin frame = 0; left = 0; right = 0; bits = 0; end

  always @(posedge bclk) begin
    frame <= 1'b0;
    if (lrck != prev) begin
      bits <= n + 1;
      if (prev) begin
        right <= {sh[30:0], sdata};
        frame <= 1'b1;
      end else begin
        left <= {sh[30:0], sdata};
      end
      n  <= 0;
      sh <= '0;
    end else begin
      sh <= {sh[30:0], sdata};
      n  <= n + 1;
    end
    prev <= lrck;
  end
endmodule
