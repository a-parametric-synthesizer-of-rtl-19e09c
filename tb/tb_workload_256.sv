// tb_workload_256: the main configuration under full load. The runtime system
// at its default size (256 components, 12.288 MHz, 115200 baud) receives
// amplitude, frequency and phase for all 256 components over the serial link
// (768 commands, amplitudes summing to less than full scale), then generates
// output; 24 samples decoded from the I2S line are compared bit for bit with
// the reference model. Checks that the synthesizer delivers one sample per
// 256 clocks (48 kHz) with every component active.
module tb_workload_256;
  import tb_ref_pkg::*;
  localparam int NC = 256, NS = 24;
  localparam real TCLK = 1.0e9 / 12.288e6;   // ns
  logic clk = 0, mclk = 0, rst_n = 1, mrst_n = 1;
  initial begin #1 rst_n = 0; mrst_n = 0; end   // a reset edge before the first clock
  always #(TCLK / 2) clk = ~clk;
  initial begin #29; forever #(TCLK / 2) mclk = ~mclk; end
  logic uart_rxd, run, bclk, lrck, sdata, stall, clipped, underflow;
  logic [31:0] frame_count;
  logic        frame;
  logic [31:0] left, right;
  int          bits;
  int checks = 0, failures = 0, nmatch = 0, asum = 0;
  int last_wr = -1, cyc = 0, nrate = 0;
  synth_model model;
  longint expq[$];

  synth_system dut (
    .clk, .rst_n, .uart_rxd, .run, .mclk, .mrst_n,
    .i2s_bclk(bclk), .i2s_lrck(lrck), .i2s_sdata(sdata),
    .frame_count, .stall, .clipped, .underflow);
  uart_tx_model #(.CPB(107)) utx (.clk, .txd(uart_rxd));
  i2s_monitor mon (.bclk, .lrck, .sdata, .frame, .left, .right, .bits);

  initial begin
    #2000ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] fc_d = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    fc_d <= frame_count;
    if (frame_count != fc_d) begin
      expq.push_back(model.next_sample());
      // output rate: one sample per 256 clocks once the FIFO is in steady state
      if (last_wr >= 0) begin
        checks++;
        if (cyc - last_wr < NC) begin failures++; $display("samples %0d clocks apart", cyc - last_wr); end
        if (cyc - last_wr == NC) nrate++;
      end
      last_wr = cyc;
    end
  end

  always @(posedge frame) begin
    checks++;
    if (left != right || bits != 32) failures++;
    if (left != 0 && nmatch < NS) begin
      longint e, got;
      got = longint'($signed(left[31:7]));
      e   = (expq.size() != 0) ? expq.pop_front() : 64'h7fffffff;
      checks++;
      if (got != e) begin failures++; $display("sample %0d: %0d expected %0d", nmatch, got, e); end
      nmatch++;
    end
  end

  initial begin
    model = new(NC);
    run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; mrst_n = 1;
    for (int k = 0; k < NC; k++) begin
      int a, f, p;
      a = $urandom_range(20, 250); f = $urandom_range(1, 218453); p = $urandom_range(1, 524287);  // f below 20 kHz
      asum += a;
      utx.send_param(0, k, a); utx.send_param(1, k, f); utx.send_param(2, k, p);
      model.amp[k] = a; model.freq[k] = f; model.phase[k] = p;
    end
    @(negedge clk) run = 1;
    wait (nmatch == NS);
    checks++;
    if (asum >= 65536 || clipped || nrate == 0) failures++;
    $display("%0d samples of 256 active components checked, sum of amplitudes %0d of 65536", NS, asum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
