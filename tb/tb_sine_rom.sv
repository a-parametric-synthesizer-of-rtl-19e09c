// tb_sine_rom: checks both quarter tables entry by entry against
// round(65535*sin(i*pi/1024)) (table A) and entry i+1 (table B), and the
// one-cycle read latency.
module tb_sine_rom;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0]  addr;
  logic [15:0] da, db;
  int checks = 0, failures = 0;

  sine_rom dut_a (.clk, .addr, .data(da));
  sine_rom #(.INIT_FILE("rtl/sine_rom_b.hex")) dut_b (.clk, .addr, .data(db));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    for (int i = 0; i < 512; i++) begin
      addr = 9'(i);
      @(posedge clk); #1;
      checks++;
      if (int'(da) != ref_rom(i) || int'(db) != ref_rom(i + 1)) begin
        failures++;
        $display("addr %0d: A=%h B=%h expected %h %h", i, da, db, ref_rom(i), ref_rom(i + 1));
      end
    end
    // latency: changing addr without a clock edge must not change data
    addr = 9'd100; @(posedge clk); #1; addr = 9'd300; #2;
    checks++;
    if (int'(da) != ref_rom(100)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
