// tb_param_ram: checks zero contents after start, random writes and reads
// against a model with one-cycle read latency, and old data on a read of the
// address being written.
module tb_param_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [7:0]  waddr, raddr;
  logic [18:0] wdata, rdata;
  int checks = 0, failures = 0;
  int model[256];

  param_ram dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    foreach (model[i]) model[i] = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) raddr = 8'(i);
      @(posedge clk); #1;
      checks++; if (rdata != 0) failures++;
    end
    for (int n = 0; n < 3000; n++) begin
      int e;
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom_range(15)); wdata = 19'($urandom);
      raddr = (n % 5 == 0) ? waddr : 8'($urandom_range(15));
      e = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = int'(wdata);
      checks++;
      if (int'(rdata) != e) begin failures++; $display("read %0d: %h expected %h", raddr, rdata, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
