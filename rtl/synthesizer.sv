// synthesizer: additive synthesis of N_COMP sinusoidal components with a
// single, time-shared sine generator.
//
// A frame computes one output sample. In a frame the issue counter walks the
// component index k = 0 .. N_COMP-1, one per clock, so one component sample is
// produced per clock and a frame takes N_COMP cycles (256 components at
// 48 kHz give a 12.288 MHz clock). Per component the pipeline
//   reads A, F, PHI of component k from the parameter RAMs (par_addr),
//   advances the component's position and maps it onto the quarter table
//     (position_calc, sign from the quarter),
//   reads the two neighbouring reference samples from two ROMs (sine_rom),
//   interpolates a 24-bit magnitude (interpolator),
//   scales it by A and applies the sign, giving 25 bits (amp_sign),
//   adds it into the frame sum (accumulator).
// After the last component the 25-bit sum is written to a dual-clock FIFO
// (async_fifo) read on rd_clk.
//
// Timing (cycles after component k is issued): parameters at +1, table
// address at +3, reference samples at +4, magnitude at +7, signed sample at
// +9, in the accumulator at +10; the output sample of a frame is written to
// the FIFO 11 cycles after its last component was issued. Frames follow each
// other without gaps while run is high and the FIFO can take the samples
// already in flight plus one; otherwise the start of the next frame waits
// (stall) — the generator never stops inside a frame, so parameters may be
// changed between any two output samples.
// The structure follows the design description; the pipeline depth (the
// description's generator needs over 20 cycles per component), the flow
// control and the status outputs are this implementation's choices.
module synthesizer
  import synth_pkg::*;
#(
  parameter int unsigned N_COMP  = 256,
  parameter int unsigned FIFO_AW = 4,
  localparam int unsigned KW     = (N_COMP > 1) ? $clog2(N_COMP) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  // parameter memory read port (data one cycle after par_addr)
  output logic [KW-1:0]         par_addr,
  input  synth_par_t            par,
  // output FIFO read side
  input  logic                  rd_clk,
  input  logic                  rd_rst_n,
  input  logic                  rd_en,
  output logic [SMP_W-1:0]      rd_data,
  output logic                  rd_empty,
  // status
  output logic                  stall,
  output logic                  clipped,
  output logic [31:0]           frame_count
);
  localparam int unsigned LAT = 11;  // issue of last component -> FIFO write

  // ---------------- issue ----------------
  logic          issuing, iss_valid, iss_first, iss_last;
  logic [KW-1:0] k;
  logic          pc_ready;
  logic [FIFO_AW:0] wr_level;
  logic [7:0]    inflight;
  logic          fifo_wr;
  logic          start_ok;

  assign start_ok  = run && pc_ready &&
                     (32'(wr_level) + 32'(inflight) + 1 < 32'(2**FIFO_AW));
  assign iss_valid = issuing || start_ok;
  assign iss_first = !issuing && start_ok;
  assign iss_last  = iss_valid && (k == KW'(N_COMP - 1));
  assign par_addr  = k;
  assign stall     = run && pc_ready && !issuing && !start_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      k        <= '0;
      inflight <= '0;
    end else begin
      if (iss_valid) begin
        if (iss_last) begin
          k       <= '0;
          issuing <= 1'b0;
        end else begin
          k       <= k + 1'b1;
          issuing <= 1'b1;
        end
      end
      inflight <= inflight + 8'(iss_first) - 8'(fifo_wr);
    end
  end

  // ---------------- position ----------------
  logic              pc_valid, pc_neg;
  logic [ROM_AW-1:0] pc_idx;
  logic [FRAC_W:0]   pc_frac;

  position_calc #(.N_COMP(N_COMP)) u_pos (
    .clk, .rst_n, .ready(pc_ready),
    .req_valid(iss_valid), .req_idx(k),
    .freq(par.freq), .phase(par.phase),
    .out_valid(pc_valid), .rom_idx(pc_idx), .frac(pc_frac), .neg(pc_neg)
  );

  // ---------------- reference tables ----------------
  logic [ROM_DW-1:0] ref_a, ref_b;
  sine_rom #(.AW(ROM_AW), .DW(ROM_DW), .INIT_FILE("rtl/sine_rom_a.hex")) u_rom_a (
    .clk, .addr(pc_idx), .data(ref_a));
  sine_rom #(.AW(ROM_AW), .DW(ROM_DW), .INIT_FILE("rtl/sine_rom_b.hex")) u_rom_b (
    .clk, .addr(pc_idx), .data(ref_b));

  logic            rom_valid;
  logic [FRAC_W:0] rom_frac;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rom_valid <= 1'b0; else rom_valid <= pc_valid;
  always_ff @(posedge clk) rom_frac <= pc_frac;

  // ---------------- interpolation ----------------
  logic             ip_valid;
  logic [MAG_W-1:0] ip_mag;
  interpolator #(.DW(ROM_DW), .FRAC_W(FRAC_W)) u_interp (
    .clk, .rst_n, .in_valid(rom_valid), .a(ref_a), .b(ref_b), .frac(rom_frac),
    .out_valid(ip_valid), .y(ip_mag));

  // ---------------- amplitude and sign ----------------
  amp_t amp_d;   // par.amp arrives at +1, needed at +7
  logic neg_d;   // neg at +3, needed at +7
  delay_line #(.W(AMP_W), .DEPTH(6)) u_amp_dly (.clk, .d(par.amp), .q(amp_d));
  delay_line #(.W(1),     .DEPTH(4)) u_neg_dly (.clk, .d(pc_neg),  .q(neg_d));

  logic    as_valid;
  sample_t as_y;
  amp_sign #(.MAG_W(MAG_W), .AMP_W(AMP_W)) u_amp (
    .clk, .rst_n, .in_valid(ip_valid), .mag(ip_mag), .amp(amp_d), .neg(neg_d),
    .out_valid(as_valid), .y(as_y));

  // ---------------- accumulation ----------------
  logic first_d, last_d;   // issued at +0, needed at +9
  delay_line #(.W(2), .DEPTH(9)) u_fl_dly (.clk, .d({iss_first, iss_last}), .q({first_d, last_d}));

  sample_t acc_y;
  logic    acc_clip;
  accumulator #(.IN_W(SMP_W), .OUT_W(SMP_W), .ACC_W(SMP_W + KW)) u_acc (
    .clk, .rst_n, .in_valid(as_valid), .first(first_d), .last(last_d), .x(as_y),
    .out_valid(fifo_wr), .y(acc_y), .clipped(acc_clip));

  // ---------------- output FIFO ----------------
  logic wr_full;
  async_fifo #(.DW(SMP_W), .AW(FIFO_AW)) u_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(fifo_wr), .wr_data(acc_y),
    .wr_full, .wr_level,
    .rd_clk, .rd_rst_n, .rd_en, .rd_data, .rd_empty);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_count <= '0;
      clipped     <= 1'b0;
    end else if (fifo_wr) begin
      frame_count <= frame_count + 1;
      if (acc_clip) clipped <= 1'b1;
    end
  end

  a_fifo_room: assert property (@(posedge clk) disable iff (!rst_n) !(fifo_wr && wr_full));
  initial assert (LAT <= 255 && N_COMP >= 2) else $error("synthesizer: bad configuration");
endmodule
