// tb_accumulator: frames of random length and content, with gaps; checks each
// frame sum (saturated to 25 bits, clipped flag) one cycle after the last
// sample, and frames driven into positive and negative saturation.
module tb_accumulator;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, first, last, out_valid, clipped;
  logic signed [24:0] x, y;
  int checks = 0, failures = 0, nclip = 0;
  longint expq[$];
  bit     expc[$];
  int cyc = 0, last_cyc[$];

  accumulator dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e; bit ec; int c;
    e = expq.pop_front(); ec = expc.pop_front(); c = last_cyc.pop_front();
    checks++;
    if (longint'(y) != e || clipped != ec || cyc - c != 1) begin
      failures++;
      $display("sum=%0d clip=%0b expected %0d %0b", y, clipped, e, ec);
    end
    if (clipped) nclip++;
  end

  task automatic frame(int len, int mode);
    longint s = 0, r;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; first = (i == 0); last = (i == len - 1);
      case (mode)
        1: x = 25'sd16000000;
        2: x = -25'sd16000000;
        default: x = 25'($urandom);
      endcase
      s += longint'(x);
      if (last) begin
        r = ref_sat(s);
        expq.push_back(r); expc.push_back(r != s); last_cyc.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; first = 0; last = 0; x = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) frame($urandom_range(1, 20), (f % 10 == 3) ? 1 : (f % 10 == 7) ? 2 : 0);
    repeat (4) @(posedge clk);
    checks++; if (expq.size() != 0 || nclip < 12) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
