// tb_amp_sign: random magnitudes, amplitudes and signs; checks
// y = +/- floor(mag*amp / 2^16) two cycles after each input.
module tb_amp_sign;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid, neg;
  logic [23:0] mag;
  logic [15:0] amp;
  logic signed [24:0] y;
  int checks = 0, failures = 0;
  longint expq[$];
  int cyc = 0, in_cyc[$];

  amp_sign dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e; int c;
    e = expq.pop_front(); c = in_cyc.pop_front();
    checks++;
    if (longint'(y) != e || cyc - c != 2) begin
      failures++;
      $display("y=%0d expected %0d latency %0d", y, e, cyc - c);
    end
  end

  initial begin
    in_valid = 0; mag = 0; amp = 0; neg = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      mag = 24'($urandom); amp = 16'($urandom); neg = 1'($urandom);
      if (n == 3) begin mag = 24'hffffff; amp = 16'hffff; neg = 1; end
      if (n == 4) begin mag = 24'hffffff; amp = 16'hffff; neg = 0; end
      if (in_valid) begin
        longint s;
        s = (longint'(mag) * amp) >> 16;
        expq.push_back(neg ? -s : s);
        in_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
