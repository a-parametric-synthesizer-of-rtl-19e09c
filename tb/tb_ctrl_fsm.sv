// tb_ctrl_fsm: random five-byte commands for all three parameters, mixed with
// stray bytes between commands (bit 7 clear, or header with selector 3) and
// idle gaps; checks every write strobe, address and value against the
// commands, and that stray bytes cause no write.
module tb_ctrl_fsm;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid, we_amp, we_freq, we_phase;
  logic [7:0]  rx_data, waddr;
  logic [23:0] wdata;
  int checks = 0, failures = 0, nstray = 0;
  int nsel[3];
  typedef struct { int sel; int idx; int val; } wr_t;
  wr_t expq[$];

  ctrl_fsm dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic [7:0] b);
    @(negedge clk);
    while ($urandom_range(2) == 0) begin rx_valid = 0; @(negedge clk); end
    rx_valid = 1; rx_data = b;
    @(negedge clk) rx_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && (we_amp || we_freq || we_phase)) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected write"); end
    else begin
      wr_t e; int s;
      e = expq.pop_front();
      s = we_amp ? 0 : we_freq ? 1 : 2;
      if (int'(we_amp) + int'(we_freq) + int'(we_phase) != 1 || s != e.sel ||
          int'(waddr) != e.idx || int'(wdata) != e.val) begin
        failures++; $display("write sel %0d idx %0d val %h expected %0d %0d %h", s, waddr, wdata, e.sel, e.idx, e.val);
      end
      nsel[s]++;
    end
  end

  initial begin
    rx_valid = 0; rx_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      wr_t w;
      if (n % 7 == 3) begin put(8'($urandom_range(127))); nstray++; end
      if (n % 11 == 5) begin put(8'h83); nstray++; end
      w.sel = $urandom_range(2); w.idx = $urandom_range(255); w.val = $urandom_range(24'hffffff);
      expq.push_back(w);
      put(8'(8'h80 | w.sel)); put(8'(w.idx));
      put(8'(w.val >> 16)); put(8'(w.val >> 8)); put(8'(w.val));
    end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nsel[0] == 0 || nsel[1] == 0 || nsel[2] == 0 || nstray == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
