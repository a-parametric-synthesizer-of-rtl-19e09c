// synth_system: the synthesizer in its runtime environment.
//
// Parameters of the components arrive from a computer over a serial RS232 line
// (uart_rx), are decoded into writes (ctrl_fsm) of three parameter memories
// (param_ram: amplitude, frequency, phase, one entry per component), which the
// synthesizer reads, one component per clock. Its output samples cross through
// the synthesizer's dual-clock FIFO to the I2S module (i2s_tx) on the audio
// master clock mclk, which drives an external D/A converter.
//
// Interface: clk is the synthesizer clock (N_COMP * 48 kHz = 12.288 MHz for
// 256 components), mclk the I2S master clock (256 * 48 kHz), each with its own
// active-low reset. run enables sample generation. frame_count counts output
// samples, underflow is set when the I2S output ran out of samples, stall is
// high while a frame waits for FIFO room, clipped is set once a sum saturated.
// The block structure follows the design description's runtime environment;
// the serial command format, the flow control and the status outputs are this
// implementation's choices. Command values are 24 bits; the memories keep the
// low 16 (amplitude) or 19 (frequency, phase) bits, so the top 5 value bits are
// unused.
module synth_system
  import synth_pkg::*;
#(
  parameter int unsigned N_COMP        = 256,
  parameter int unsigned CLKS_PER_BIT  = 107,   // 12.288 MHz / 115200 baud
  parameter int unsigned FIFO_AW       = 4,
  parameter int unsigned MCLK_PER_BCLK = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_rxd,
  input  logic        run,
  input  logic        mclk,
  input  logic        mrst_n,
  output logic        i2s_bclk,
  output logic        i2s_lrck,
  output logic        i2s_sdata,
  output logic [31:0] frame_count,
  output logic        stall,
  output logic        clipped,
  output logic        underflow
);
  localparam int unsigned KW = (N_COMP > 1) ? $clog2(N_COMP) : 1;

  logic       rx_valid, rx_err;
  logic [7:0] rx_data;
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data), .frame_err(rx_err));

  logic          we_amp, we_freq, we_phase;
  logic [KW-1:0] waddr;
  logic [23:0]   wdata;
  ctrl_fsm #(.N_COMP(N_COMP)) u_ctrl (
    .clk, .rst_n, .rx_valid(rx_valid && !rx_err), .rx_data,
    .we_amp, .we_freq, .we_phase, .waddr, .wdata);

  logic [KW-1:0] par_addr;
  synth_par_t    par;
  param_ram #(.DEPTH(N_COMP), .DW(AMP_W)) u_ram_amp (
    .clk, .we(we_amp), .waddr, .wdata(wdata[AMP_W-1:0]), .raddr(par_addr), .rdata(par.amp));
  param_ram #(.DEPTH(N_COMP), .DW(FREQ_W)) u_ram_freq (
    .clk, .we(we_freq), .waddr, .wdata(wdata[FREQ_W-1:0]), .raddr(par_addr), .rdata(par.freq));
  param_ram #(.DEPTH(N_COMP), .DW(PHASE_W)) u_ram_phase (
    .clk, .we(we_phase), .waddr, .wdata(wdata[PHASE_W-1:0]), .raddr(par_addr), .rdata(par.phase));

  logic             src_rd, src_empty;
  logic [SMP_W-1:0] src_data;
  synthesizer #(.N_COMP(N_COMP), .FIFO_AW(FIFO_AW)) u_synth (
    .clk, .rst_n, .run,
    .par_addr, .par,
    .rd_clk(mclk), .rd_rst_n(mrst_n), .rd_en(src_rd), .rd_data(src_data), .rd_empty(src_empty),
    .stall, .clipped, .frame_count);

  i2s_tx #(.DW(SMP_W), .FIFO_AW(2), .MCLK_PER_BCLK(MCLK_PER_BCLK)) u_i2s (
    .clk(mclk), .rst_n(mrst_n), .src_empty, .src_data, .src_rd,
    .bclk(i2s_bclk), .lrck(i2s_lrck), .sdata(i2s_sdata), .underflow);
endmodule
