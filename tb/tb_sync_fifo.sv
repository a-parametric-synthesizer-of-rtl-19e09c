// tb_sync_fifo: random pushes and pops (never into a full or from an empty
// FIFO) against a queue model; checks head data, full and empty at every
// cycle and that the FIFO was both filled and drained.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, full, empty;
  logic [24:0] wr_data, rd_data;
  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  logic [24:0] q[$];

  sync_fifo dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int bias;
      bias = (n / 500) % 2;
      @(negedge clk);
      checks++;
      if (full != (q.size() == 4) || empty != (q.size() == 0) || (q.size() != 0 && rd_data != q[0])) begin
        failures++; $display("n=%0d full %0b empty %0b size %0d", n, full, empty, q.size());
      end
      if (full) nfull++;
      if (empty) nempty++;
      wr_en = !full && ($urandom_range(9) < (bias ? 7 : 3));
      rd_en = !empty && ($urandom_range(9) < (bias ? 3 : 7));
      wr_data = 25'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    checks++; if (nfull == 0 || nempty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
