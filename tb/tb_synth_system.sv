// tb_synth_system: end-to-end test of the runtime environment at reduced size
// (8 components, 8 clocks per UART bit), with the I2S master clock unrelated to
// the synthesizer clock. Parameters are sent as serial commands (plus a stray
// byte that must be ignored); the I2S line is decoded and every non-silent
// frame is compared, in order, with the reference model. The test makes each
// mechanism happen and counts it: silence with underflow before generation
// starts, parameter writes to all three memories (after a stray byte and a
// header with a framing error, both of which must be ignored), stall of the generator on
// a full FIFO, new parameters between output samples, and saturation of the
// sum; a mechanism never seen counts as a failure.
module tb_synth_system;
  import tb_ref_pkg::*;
  localparam int NC = 8, CPB = 8;
  logic clk = 0, mclk = 0, rst_n = 1, mrst_n = 1;
  initial begin #1 rst_n = 0; mrst_n = 0; end   // a reset edge before the first clock
  always #5 clk = ~clk;
  always #5.35 mclk = ~mclk;
  logic uart_rxd, run, bclk, lrck, sdata, stall, clipped, underflow;
  logic [31:0] frame_count;
  logic        frame;
  logic [31:0] left, right;
  int          bits;
  int checks = 0, failures = 0;
  int nsilent = 0, nmatch = 0, nstall = 0, nchange = 0, nwrites = 0, nclip_exp = 0;
  synth_model model;
  longint expq[$];

  synth_system #(.N_COMP(NC), .CLKS_PER_BIT(CPB)) dut (
    .clk, .rst_n, .uart_rxd, .run, .mclk, .mrst_n,
    .i2s_bclk(bclk), .i2s_lrck(lrck), .i2s_sdata(sdata),
    .frame_count, .stall, .clipped, .underflow);
  uart_tx_model #(.CPB(CPB)) utx (.clk, .txd(uart_rxd));
  i2s_monitor mon (.bclk, .lrck, .sdata, .frame, .left, .right, .bits);

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] fc_d = 0;
  always @(posedge clk) if (rst_n) begin
    fc_d <= frame_count;
    if (stall) nstall++;
    if (frame_count != fc_d) begin
      longint e;
      e = model.next_sample();
      if (e == 16777215 || e == -16777216) nclip_exp++;
      expq.push_back(e);
    end
  end

  always @(posedge frame) begin
    checks++;
    if (left != right || bits != 32) begin failures++; $display("bad frame L=%h R=%h bits %0d", left, right, bits); end
    if (left == 0) nsilent++;
    else begin
      longint e, got;
      got = longint'($signed(left[31:7]));
      e = (expq.size() != 0) ? expq.pop_front() : 64'h7fffffff;
      if (got != e) begin failures++; $display("I2S sample %0d: %0d expected %0d", nmatch, got, e); end
      else nmatch++;
    end
  end

  task automatic write_all(bit loud);
    for (int k = 0; k < NC; k++) begin
      int a, f, p;
      a = loud ? 65535 : $urandom_range(1000, 65535 / NC);
      f = loud ? 3000 : $urandom_range(100, 100000);
      p = loud ? (131072 - model.pos[k]) & 32'h7FFFF : $urandom_range(1, 524287);   // loud: all at pi/2
      utx.send_param(0, k, a); utx.send_param(1, k, f); utx.send_param(2, k, p);
      model.amp[k] = a; model.freq[k] = f; model.phase[k] = p;
      nwrites += 3;
    end
  endtask

  task automatic play(int frames);
    int start;
    @(negedge clk) run = 1;
    start = nmatch;
    wait (nmatch >= start + frames);
    @(negedge clk) run = 0;
    repeat (NC + 20) @(posedge clk);
  endtask

  initial begin
    model = new(NC);
    run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; mrst_n = 1;
    utx.send_byte(8'h12);                 // stray byte, ignored
    utx.send_bad_stop(8'h81);             // a header with a framing error, dropped
    write_all(0);
    checks++;
    if (!underflow || nsilent == 0) begin failures++; $display("no silence before start"); end
    play(30);
    for (int c = 0; c < 2; c++) begin
      write_all(0); nchange++;
      play(15);
    end
    write_all(1);
    play(15);
    wait (expq.size() == 0);
    repeat (2 * 256 * 2) @(posedge mclk);
    checks++;
    if (nmatch < 70 || nstall == 0 || nchange == 0 || nclip_exp == 0 || !clipped || nwrites == 0) begin
      failures++;
      $display("matched %0d stall %0d change %0d clip %0d/%0b", nmatch, nstall, nchange, nclip_exp, clipped);
    end
    $display("mechanisms: silent frames %0d, parameter writes %0d, stall cycles %0d, parameter changes %0d, clipped samples %0d, samples checked %0d",
             nsilent, nwrites, nstall, nchange, nclip_exp, nmatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
