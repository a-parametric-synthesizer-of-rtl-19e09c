// tb_synth_system_full: the runtime environment at its full size (256
// components, 12.288 MHz synthesizer and I2S master clocks, 115200 baud),
// with the two clocks offset in phase. Six components are set over the serial
// link, among them the 12 kHz tone of zero phase, which must step through the
// period a quarter at a time (0, +peak, 0, -peak); the remaining 250 keep
// amplitude zero. Forty output samples are decoded from the I2S line and
// compared bit for bit with the reference model and, within the table and
// interpolation error, with ideal sines. Also checks the 48 kHz frame rate
// (256 master clocks per frame) and 32-bit slots.
module tb_synth_system_full;
  import tb_ref_pkg::*;
  localparam int NC = 256, NACT = 6;
  localparam real TCLK = 1.0e9 / 12.288e6;   // ns
  logic clk = 0, mclk = 0, rst_n = 1, mrst_n = 1;
  initial begin #1 rst_n = 0; mrst_n = 0; end   // a reset edge before the first clock
  always #(TCLK / 2) clk = ~clk;
  initial begin #13; forever #(TCLK / 2) mclk = ~mclk; end
  logic uart_rxd, run, bclk, lrck, sdata, stall, clipped, underflow;
  logic [31:0] frame_count;
  logic        frame;
  logic [31:0] left, right;
  int          bits;
  int checks = 0, failures = 0, nmatch = 0, nsilent = 0;
  synth_model model, ideal;
  longint expq[$];
  real idealq[$], peak_err = 0.0;
  longint tone12[$];
  realtime last_lr = 0;
  int a[NACT] = '{32768, 8000, 6000, 4000, 3000, 2000};
  int f[NACT] = '{131072, 10923, 2796, 21845, 65536, 1234};   // 12 kHz, 1 kHz, 256 Hz, 2 kHz, 6 kHz, ~113 Hz
  int p[NACT] = '{0, 100000, 200000, 300000, 400000, 500000};

  synth_system dut (
    .clk, .rst_n, .uart_rxd, .run, .mclk, .mrst_n,
    .i2s_bclk(bclk), .i2s_lrck(lrck), .i2s_sdata(sdata),
    .frame_count, .stall, .clipped, .underflow);
  uart_tx_model #(.CPB(107)) utx (.clk, .txd(uart_rxd));
  i2s_monitor mon (.bclk, .lrck, .sdata, .frame, .left, .right, .bits);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference values for each sample written by the synthesizer
  logic [31:0] fc_d = 0;
  always @(posedge clk) if (rst_n) begin
    fc_d <= frame_count;
    if (frame_count != fc_d) begin
      real s;
      s = 0.0;
      for (int k = 0; k < NACT; k++)
        s += real'(a[k]) / 65536.0 * 16776960.0 *
             $sin(2.0 * PI * real'((model.pos[k] + p[k]) & 32'h7FFFF) / 524288.0);
      idealq.push_back(s);
      // the 12 kHz component alone
      tone12.push_back(ref_comp((model.pos[0] + p[0]) & 32'h7FFFF, a[0]));
      expq.push_back(model.next_sample());
    end
  end

  always @(posedge lrck) begin
    if (last_lr > 0) begin
      checks++;
      if ((($realtime - last_lr) / TCLK) > 256.01 || (($realtime - last_lr) / TCLK) < 255.99) begin
        failures++; $display("I2S frame period %f clocks", ($realtime - last_lr) / TCLK);
      end
    end
    last_lr = $realtime;
  end

  always @(posedge frame) begin
    checks++;
    if (left != right || bits != 32) failures++;
    if (left == 0) nsilent++;
    else if (nmatch < 40) begin
      longint e, got, t;
      real id, err;
      got = longint'($signed(left[31:7]));
      e   = (expq.size() != 0) ? expq.pop_front() : 64'h7fffffff;
      id  = idealq.pop_front();
      t   = tone12.pop_front();
      err = real'(got) - id;
      if (err < 0.0) err = -err;
      if (err > peak_err) peak_err = err;
      checks += 3;
      if (got != e) begin failures++; $display("sample %0d: %0d expected %0d", nmatch, got, e); end
      if (err > 150.0 * NACT) begin failures++; $display("sample %0d: %0d, ideal %f", nmatch, got, id); end
      // 12 kHz, zero phase: 0, +peak, 0, -peak (peak = half scale)
      case (nmatch % 4)
        0, 2: if (t != 0) failures++;
        1:    if (t != 8388480) failures++;
        3:    if (t != -8388480) failures++;
      endcase
      nmatch++;
    end
  end

  initial begin
    model = new(NC);
    run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; mrst_n = 1;
    for (int k = 0; k < NACT; k++) begin
      utx.send_param(0, k, a[k]); utx.send_param(1, k, f[k]); utx.send_param(2, k, p[k]);
      model.amp[k] = a[k]; model.freq[k] = f[k]; model.phase[k] = p[k];
    end
    @(negedge clk) run = 1;
    wait (nmatch == 40);
    checks++;
    if (nsilent == 0 || !underflow || clipped) failures++;
    $display("40 samples checked, largest deviation from ideal sines %0.1f LSB of 2^24", peak_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
