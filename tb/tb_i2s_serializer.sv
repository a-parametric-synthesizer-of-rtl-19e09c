// tb_i2s_serializer: feeds random 25-bit samples, sometimes withholding one;
// decodes the I2S line and checks each frame carries the sample, left-justified,
// in both slots (or silence and an underflow pulse when none was offered),
// 32-bit slots, and a frame period of 256 master clocks.
module tb_i2s_serializer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sample_valid, sample_ack, bclk, lrck, sdata, underflow;
  logic [24:0] sample;
  logic        frame;
  logic [31:0] left, right;
  int          bits;
  int checks = 0, failures = 0, nuf = 0, nframes = 0, nsilent = 0;
  logic [31:0] expq[$];
  int cyc = 0, last_ack = -1;

  i2s_serializer dut (.*);
  i2s_monitor mon (.bclk, .lrck, .sdata, .frame, .left, .right, .bits);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // source: offers a sample most of the time
  always @(posedge clk) begin
    if (!rst_n) begin
      sample_valid <= 0; sample <= 0;
    end else begin
      if (sample_ack || underflow) begin
        if (sample_ack) expq.push_back({sample, 7'b0});
        sample_valid <= ($urandom_range(3) != 0);
        sample <= 25'($urandom);
      end
      if (underflow) begin expq.push_back(32'h0); nuf++; end
      if (sample_ack || underflow) begin
        if (last_ack >= 0) begin
          checks++;
          if (cyc - last_ack - (sample_ack ? 0 : 1) != 256) begin failures++; $display("frame period %0d", cyc - last_ack); end
        end
        last_ack <= cyc - (sample_ack ? 0 : 1);
      end
    end
  end

  always @(posedge frame) begin
    logic [31:0] e;
    nframes++;
    begin
      e = (expq.size() != 0) ? expq.pop_front() : 32'hdeadbeef;
      checks++;
      if (left != e || right != e || bits != 32) begin
        failures++; $display("frame %0d: L=%h R=%h bits %0d expected %h", nframes, left, right, bits, e);
      end
      if (e == 0) nsilent++;
    end
  end

  initial begin
    sample_valid = 0; sample = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nframes == 60);
    checks++;
    if (nuf == 0 || nsilent == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
