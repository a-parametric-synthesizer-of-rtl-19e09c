// tb_interpolator: random and corner inputs; checks
// y = 256*a + (b-a)*frac three cycles after each input, one input per cycle.
module tb_interpolator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [15:0] a, b;
  logic [8:0]  frac;
  logic [23:0] y;
  int checks = 0, failures = 0;
  longint expq[$];
  int cyc = 0, in_cyc[$];

  interpolator dut (.*);

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
    if (longint'(y) != e || cyc - c != 3) begin
      failures++;
      $display("y=%0d expected %0d latency %0d", y, e, cyc - c);
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0; frac = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      a = 16'($urandom); b = 16'($urandom);
      if (n % 3 == 0) begin b = a + 16'($urandom_range(400)); end
      case (n % 7) 0: frac = 0; 1: frac = 256; default: frac = 9'($urandom_range(256)); endcase
      if (n == 5) begin a = 16'hfffe; b = 16'hffff; frac = 256; end
      if (in_valid) begin
        expq.push_back(longint'(a) * 256 + (longint'(b) - longint'(a)) * frac);
        in_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (6) @(posedge clk);
    checks++; if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
