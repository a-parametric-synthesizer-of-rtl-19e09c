// tb_async_fifo: writer and reader on unrelated clocks (10 ns and 7.3 ns),
// random rates in phases that fill and drain the FIFO; checks that the data
// arrive complete and in order, that full and empty both occur, and that the
// write-side level never falls below the true fill.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #3.65 rclk = ~rclk;
  logic wr_en, wr_full, rd_en, rd_empty;
  logic [24:0] wr_data, rd_data;
  logic [4:0]  wr_level;
  int checks = 0, failures = 0, nfull = 0, nempty = 0, nwr = 0, nrd = 0;
  logic [24:0] q[$];
  bit done = 0, fast_rd = 0;

  async_fifo dut (.wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full, .wr_level,
                  .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    wr_en = 0; wr_data = 0;
    #22 wrst_n = 1; rrst_n = 1;
    while (nwr < 2000) begin
      @(negedge wclk);
      if (wr_full) nfull++;
      checks++;
      if (int'(wr_level) < q.size() || wr_level > 16) begin failures++; $display("level %0d < %0d", wr_level, q.size()); end
      wr_en = !wr_full && ($urandom_range(9) < (fast_rd ? 3 : 9));
      wr_data = 25'($urandom);
      @(posedge wclk);
      if (wr_en) begin q.push_back(wr_data); nwr++; end
    end
    @(negedge wclk) wr_en = 0;
  end

  // reader
  initial begin
    rd_en = 0;
    @(posedge rrst_n);
    while (nrd < 2000) begin
      @(negedge rclk);
      if ((nrd / 300) % 2 == 1) fast_rd = 1; else fast_rd = 0;
      if (rd_empty) nempty++;
      rd_en = !rd_empty && ($urandom_range(9) < (fast_rd ? 9 : 3));
      if (rd_en) begin
        checks++;
        if (q.size() == 0 || rd_data != q[0]) begin failures++; $display("read %h", rd_data); end
        else void'(q.pop_front());
        nrd++;
      end
      @(posedge rclk);
    end
    rd_en = 0;
    checks++;
    if (nfull == 0 || nempty == 0) begin failures++; $display("full %0d empty %0d", nfull, nempty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
