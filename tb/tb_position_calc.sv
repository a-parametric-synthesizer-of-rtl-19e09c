// tb_position_calc: 4 components issued round-robin with gaps, random
// frequency and phase words (changed now and then); checks the table index,
// interpolation weight and sign against a model of the accumulated positions,
// the 3-cycle latency, the clearing sweep after reset, and that all four
// quarters and the exact pi/2 point occur.
module tb_position_calc;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ready, req_valid, out_valid, neg;
  logic [1:0]  req_idx;
  logic [18:0] freq, phase;
  logic [8:0]  rom_idx, frac;
  int checks = 0, failures = 0;
  int fr[NC], ph[NC], pos[NC];
  int expq[$], cycq[$];
  int cyc = 0, qseen[4], halfpi = 0;
  int rdy_cyc;

  position_calc #(.N_COMP(NC)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    int p, q, m, qp, ei, ef, c;
    p = expq.pop_front(); c = cycq.pop_front();
    q = p >> 17; m = p & 32'h1FFFF;
    qp = (q == 1 || q == 3) ? 131072 - m : m;
    if (qp == 131072) begin ei = 511; ef = 256; halfpi++; end
    else begin ei = qp >> 8; ef = qp & 255; end
    qseen[q]++;
    checks++;
    if (int'(rom_idx) != ei || int'(frac) != ef || neg != (q >= 2) || cyc - c != 3) begin
      failures++;
      $display("pos %h: idx %0d frac %0d neg %0b, expected %0d %0d %0b, latency %0d",
               p, rom_idx, frac, neg, ei, ef, q >= 2, cyc - c);
    end
  end

  initial begin
    req_valid = 0; req_idx = 0; freq = 0; phase = 0;
    for (int k = 0; k < NC; k++) begin
      fr[k] = $urandom_range(524287); ph[k] = $urandom_range(524287); pos[k] = 0;
    end
    fr[0] = 131072; ph[0] = 0;        // the quarter step of a 12 kHz tone
    ph[1] = 131072; fr[1] = 0;        // pi/2 exactly, every sample
    repeat (3) @(posedge clk);
    rst_n = 1;
    rdy_cyc = cyc;
    while (!ready) @(posedge clk);
    checks++;
    if (cyc - rdy_cyc > NC + 1) begin failures++; $display("clear sweep too long"); end
    for (int n = 0; n < 1500; n++) begin
      for (int k = 0; k < NC; k++) begin
        @(negedge clk);
        while ($urandom_range(5) == 0) begin req_valid = 0; @(negedge clk); end
        req_valid = 1; req_idx = 2'(k);
        expq.push_back((pos[k] + ph[k]) & 32'h7FFFF);
        cycq.push_back(cyc);
        pos[k] = (pos[k] + fr[k]) & 32'h7FFFF;
        @(negedge clk);
        req_valid = 0;
        freq = 19'(fr[k]); phase = 19'(ph[k]);
      end
      if (n % 100 == 99) begin
        int k = $urandom_range(2, NC - 1);
        fr[k] = $urandom_range(524287); ph[k] = $urandom_range(524287);
      end
    end
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0 || qseen[0] == 0 || qseen[1] == 0 || qseen[2] == 0 || qseen[3] == 0 || halfpi == 0) begin
      failures++;
      $display("coverage: quarters %0d %0d %0d %0d, pi/2 %0d", qseen[0], qseen[1], qseen[2], qseen[3], halfpi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
