// tb_i2s_tx: an upstream first-word fall-through queue, refilled in bursts,
// feeds the I2S module; checks that the decoded I2S frames carry the queued
// samples in order, that its FIFO keeps the upstream queue drained while it has
// room, and that silence and the sticky underflow flag appear when the
// upstream queue runs dry.
module tb_i2s_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic src_empty, src_rd, bclk, lrck, sdata, underflow;
  logic [24:0] src_data;
  logic        frame;
  logic [31:0] left, right;
  int          bits;
  int checks = 0, failures = 0, nframes = 0, nsilent = 0, nsent = 0;
  logic [24:0] up[$];     // upstream queue
  logic [31:0] sent[$];   // samples handed to the module, in order

  i2s_tx dut (.*);
  i2s_monitor mon (.bclk, .lrck, .sdata, .frame, .left, .right, .bits);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin src_empty = 1; src_data = 0; end
  always @(negedge clk) begin
    src_empty = (up.size() == 0);
    src_data  = (up.size() != 0) ? up[0] : '0;
  end
  always @(posedge clk) if (rst_n && src_rd) begin
    sent.push_back({src_data, 7'b0});
    void'(up.pop_front());
  end

  always @(posedge frame) begin
    nframes++;
    checks++;
    if (left != right || bits != 32) failures++;
    if (left == 0) nsilent++;
    else if (sent.size() == 0 || left != sent[0]) begin
      failures++; $display("frame %0d: %h expected %h", nframes, left, sent.size() ? sent[0] : 0);
    end else begin
      void'(sent.pop_front()); nsent++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 6; burst++) begin
      for (int i = 0; i < 10; i++) up.push_back(25'($urandom_range(1, 25'h1ffffff)));
      wait (up.size() == 0);
      if (burst == 2) repeat (256 * 8) @(posedge clk);   // upstream dry: silence
    end
    wait (sent.size() == 0);
    repeat (600) @(posedge clk);
    checks++;
    if (nsent != 60 || nsilent == 0 || !underflow) begin
      failures++; $display("sent %0d silent %0d underflow %0b", nsent, nsilent, underflow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
