// tb_uart_rx: sends random bytes at 32 clocks per bit with random idle gaps
// and a few percent baud error; checks every byte, that each arrives within
// the stop bit, that a short glitch on the idle line is ignored and that a
// zero stop bit raises frame_err.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rxd, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0, nerr = 0;
  logic [7:0] expq[$];
  bit         experr[$];

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b, bit stop, int bitlen);
    logic [9:0] fr;
    fr = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = fr[i];
      repeat (bitlen) @(posedge clk);
    end
    rxd = 1;
  endtask

  always @(posedge clk) if (rst_n && valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected byte %h at %0t", data, $time); end
    else begin
      logic [7:0] e; bit ee;
      e = expq.pop_front(); ee = experr.pop_front();
      if (data != e || frame_err != ee) begin failures++; $display("got %h err %0b expected %h %0b", data, frame_err, e, ee); end
      if (frame_err) nerr++;
    end
  end

  initial begin
    rxd = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    // glitch shorter than half a bit
    rxd = 0; repeat (CPB / 4) @(posedge clk); rxd = 1;
    repeat (3 * CPB) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      logic [7:0] b; bit st;
      b = 8'($urandom);
      st = (n % 50 != 17);
      expq.push_back(b); experr.push_back(!st);
      send(b, st, CPB + ((n % 3) - 1));   // +-1 clock per bit: about 3 %
      if (!st) begin rxd = 1; repeat (2 * CPB) @(posedge clk); end
      repeat ($urandom_range(3)) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nerr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
