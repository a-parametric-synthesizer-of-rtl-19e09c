// tb_synthesizer: 8 components, parameter memories modelled in the testbench
// (one-cycle read), FIFO read on an unrelated 7 ns clock. Phases of the test:
// random tones with a fast reader (checks back-to-back frames exactly N_COMP
// cycles apart and the latency from run to the first sample), a stopped
// reader (the generator must stall between frames and lose nothing), new
// parameters between output samples, parameters rewritten while frames run
// back to back (each change must take effect from the next frame), and all components at full amplitude in
// phase (the sum must saturate). Every output sample is compared with the
// reference model of tb_ref_pkg.
module tb_synthesizer;
  import tb_ref_pkg::*;
  localparam int NC = 8;
  logic clk = 0, rclk = 0, rst_n = 0, rrst_n = 0;
  always #5 clk = ~clk;
  always #3.5 rclk = ~rclk;
  logic run, rd_en, rd_empty, stall, clipped;
  logic [2:0]  par_addr;
  synth_pkg::synth_par_t par;
  logic [24:0] rd_data;
  logic [31:0] frame_count;
  int checks = 0, failures = 0;
  int ram_a[NC], ram_f[NC], ram_p[NC];
  synth_model model;
  longint expq[$];
  int cyc = 0, last_wr = -1, nb2b = 0, nstall = 0, nread = 0, nclip = 0, nchange = 0;
  int run_cyc;
  bit reader_on = 1, first_seen = 0;

  synthesizer #(.N_COMP(NC)) dut (.clk, .rst_n, .run, .par_addr, .par,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty, .stall, .clipped, .frame_count);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Live updates: right after partial j (j >= 1) of frame n has been read, its
  // memory entries are rewritten; the new values must take effect in frame n+1.
  typedef struct { int fr; int k; int a; int f; int p; } upd_t;
  upd_t sched[$];
  int cnt1 = 0, nlive = 0, model_fr = 0;
  bit live = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    par.amp   <= 16'(ram_a[par_addr]);
    par.freq  <= 19'(ram_f[par_addr]);
    par.phase <= 19'(ram_p[par_addr]);
    if (rst_n && par_addr == 3'd1) cnt1++;     // partial 1 is read once per frame
    if (rst_n && live && par_addr != 0 && $urandom_range(2) == 0) begin
      upd_t u;
      u.fr = cnt1; u.k = int'(par_addr);
      u.a = $urandom_range(65535 / NC); u.f = $urandom_range(262143); u.p = $urandom_range(524287);
      ram_a[u.k] = u.a; ram_f[u.k] = u.f; ram_p[u.k] = u.p;
      sched.push_back(u);
      nlive++;
    end
  end

  // expected sample for each frame written into the FIFO
  logic [31:0] fc_d = 0;
  always @(posedge clk) if (rst_n) begin
    fc_d <= frame_count;
    if (stall) nstall++;
    if (frame_count != fc_d) begin
      longint e;
      while (sched.size() != 0 && sched[0].fr <= model_fr) begin
        upd_t u;
        u = sched.pop_front();
        model.amp[u.k] = u.a; model.freq[u.k] = u.f; model.phase[u.k] = u.p;
      end
      e = model.next_sample();
      model_fr++;
      expq.push_back(e);
      if (e == 16777215 || e == -16777216) nclip++;
      if (!first_seen) begin
        first_seen = 1;
        checks++;
        // component 0 issued in the cycle run rose; sum written 11 cycles after the last
        if (cyc - run_cyc != NC - 1 + 11) begin failures++; $display("first sample after %0d cycles", cyc - run_cyc); end
      end
      if (last_wr >= 0 && cyc - last_wr == NC) nb2b++;
      if (last_wr >= 0 && cyc - last_wr < NC) begin failures++; $display("frames %0d cycles apart", cyc - last_wr); end
      last_wr = cyc;
    end
  end

  // reader
  always @(negedge rclk) rd_en = rrst_n && reader_on && !rd_empty && ($urandom_range(3) != 0);
  always @(posedge rclk) if (rrst_n && rd_en) begin
    longint e;
    checks++; nread++;
    e = (expq.size() != 0) ? expq.pop_front() : 64'h7fffffff;
    if (longint'($signed(rd_data)) != e) begin failures++; $display("sample %0d: %0d expected %0d", nread, $signed(rd_data), e); end
  end

  task automatic set_params(bit loud);
    sched.delete();   // overwritten before they could take effect
    for (int k = 0; k < NC; k++) begin
      ram_a[k] = loud ? 65535 : $urandom_range(65535 / NC);
      ram_f[k] = loud ? 4000 : $urandom_range(262143);
      ram_p[k] = loud ? 131072 : $urandom_range(524287);
      model.amp[k] = ram_a[k]; model.freq[k] = ram_f[k]; model.phase[k] = ram_p[k];
    end
  endtask

  task automatic drain();
    @(negedge clk) run = 0;
    repeat (NC + 20) @(posedge clk);
  endtask

  initial begin
    model = new(NC);
    run = 0; rd_en = 0;
    foreach (ram_a[k]) begin ram_a[k] = 0; ram_f[k] = 0; ram_p[k] = 0; end
    set_params(0);
    repeat (3) @(posedge clk);
    rst_n = 1; rrst_n = 1;
    repeat (NC + 5) @(posedge clk);
    @(negedge clk) run = 1; run_cyc = cyc;
    repeat (NC * 60) @(posedge clk);
    reader_on = 0;                               // FIFO fills, generator stalls
    repeat (NC * 40) @(posedge clk);
    reader_on = 1;
    repeat (NC * 30) @(posedge clk);
    for (int c = 0; c < 5; c++) begin           // new parameters between samples
      drain();
      set_params(0); nchange++;
      @(negedge clk) run = 1;
      repeat (NC * 20) @(posedge clk);
    end
    @(negedge clk) run = 1;                      // parameters rewritten while running
    live = 1;
    repeat (NC * 40) @(posedge clk);
    @(negedge clk) live = 0;
    drain();
    set_params(1);                               // all in phase at full scale
    @(negedge clk) run = 1;
    repeat (NC * 30) @(posedge clk);
    drain();
    repeat (300) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nb2b < 50 || nstall == 0 || nclip == 0 || !clipped || nread < 100 || nlive < 50) begin
      failures++;
      $display("left %0d back-to-back %0d stall %0d clip %0d/%0b read %0d live %0d", expq.size(), nb2b, nstall, nclip, clipped, nread, nlive);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
