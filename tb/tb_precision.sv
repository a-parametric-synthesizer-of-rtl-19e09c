// tb_precision: accuracy of the generated sine over one quarter period.
// The synthesizer at full size (256 components) runs one component at full
// amplitude with a phase step of 64 position units, so 2048 consecutive output
// samples cover the first quarter of the period; the other components are
// silent. Each sample is compared with the ideal value
// amp/2^16 * 65535*256 * sin(2*pi*n*64/2^19), and a per-sample peak
// signal-to-noise ratio 20*log10(2^24 / |error|) is formed; the test requires
// every sample to reach 86.02 dB and every sample to equal the bit-exact
// reference model. It prints the smallest ratio found.
module tb_precision;
  import tb_ref_pkg::*;
  localparam int NS = 2048, AMP = 65535, STEP = 64;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;
  logic run, rd_en, rd_empty, stall, clipped;
  logic [7:0]  par_addr;
  synth_pkg::synth_par_t par;
  logic [24:0] rd_data;
  logic [31:0] frame_count;
  int checks = 0, failures = 0, n = 0;
  real min_psnr = 1000.0;

  synthesizer dut (.clk, .rst_n, .run, .par_addr, .par,
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_empty, .stall, .clipped, .frame_count);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    par.amp   <= (par_addr == 0) ? 16'(AMP) : 16'd0;
    par.freq  <= (par_addr == 0) ? 19'(STEP) : 19'd0;
    par.phase <= 19'd0;
  end

  assign rd_en = !rd_empty;
  always @(posedge clk) if (rst_n && rd_en && n < NS) begin
    real id, err, psnr;
    longint got;
    got = longint'($signed(rd_data));
    id  = real'(AMP) / 65536.0 * 16776960.0 * $sin(2.0 * PI * real'(n * STEP) / 524288.0);
    err = real'(got) - id;
    if (err < 0.0) err = -err;
    psnr = (err < 1.0e-3) ? 200.0 : 20.0 * $log10(16777216.0 / err);
    if (psnr < min_psnr) min_psnr = psnr;
    checks += 2;
    if (psnr < 86.02) begin failures++; $display("sample %0d: %0d ideal %f", n, got, id); end
    if (got != ref_comp(n * STEP, AMP)) begin failures++; $display("sample %0d: %0d model %0d", n, got, ref_comp(n * STEP, AMP)); end
    n++;
  end

  initial begin
    run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) run = 1;
    wait (n == NS);
    @(negedge clk) run = 0;
    $display("%0d samples over a quarter period, smallest per-sample PSNR %0.2f dB", NS, min_psnr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
