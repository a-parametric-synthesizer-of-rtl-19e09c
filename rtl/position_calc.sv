// position_calc: per-component position in the sine period, and its mapping
// onto the quarter-period table.
//
// Each of N_COMP components keeps an accumulated position p (POS_W bits, one
// period = 2^POS_W, so the modulo-period wrap is the natural overflow). When
// component k is issued, p[k] is read; one cycle later its frequency word F and
// phase word PHI arrive from the parameter RAMs, p[k] + F is written back and
// the sample position p[k] + PHI is registered. The next stage decodes the
// quarter from the two top bits: Q1 and Q3 use the position inside the quarter
// m directly, Q2 and Q4 the mirrored position 2^QPOS_W - m, and Q3/Q4 mark the
// sample negative. The mirrored position 2^QPOS_W (exactly pi/2) is expressed as
// the last table entry with full weight (frac = 256).
//
// Timing: req at cycle t, freq/phase at t+1, outputs at t+3. A component must
// not be issued again within 2 cycles (N_COMP >= 2 in the round-robin use).
// After reset the position memory is cleared by a sweep of N_COMP cycles;
// ready is low until it is done. Reset behaviour and the use of PHI as a fixed
// offset are this implementation's choices; the quarter relations follow the
// design description.
module position_calc
  import synth_pkg::*;
#(
  parameter int unsigned N_COMP = 256,
  localparam int unsigned KW    = (N_COMP > 1) ? $clog2(N_COMP) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  input  logic                 req_valid,
  input  logic [KW-1:0]        req_idx,
  input  logic [FREQ_W-1:0]    freq,
  input  logic [PHASE_W-1:0]   phase,
  output logic                 out_valid,
  output logic [ROM_AW-1:0]    rom_idx,
  output logic [FRAC_W:0]      frac,
  output logic                 neg
);
  pos_t acc_mem [N_COMP];

  // clear sweep
  logic          clearing;
  logic [KW-1:0] clr_idx;

  // stage 1: stored position read
  logic          s1_valid;
  logic [KW-1:0] s1_idx;
  pos_t          s1_p;
  // stage 2: sample position
  logic          s2_valid;
  pos_t          s2_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
    end else if (clearing) begin
      clr_idx <= clr_idx + 1'b1;
      if (clr_idx == KW'(N_COMP - 1)) clearing <= 1'b0;
    end
  end
  assign ready = !clearing;

  always_ff @(posedge clk) begin
    s1_p   <= acc_mem[req_idx];
    s1_idx <= req_idx;
    if (clearing)      acc_mem[clr_idx] <= '0;
    else if (s1_valid) acc_mem[s1_idx]  <= s1_p + pos_t'(freq);
    s2_pos <= s1_p + pos_t'(phase);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s2_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= req_valid && !clearing;
      s2_valid  <= s1_valid;
      out_valid <= s2_valid;
    end
  end

  // stage 3: quarter decode and mirroring
  quarter_e              q;
  logic [QPOS_W-1:0]     m;
  logic [QPOS_W:0]       qpos;   // position inside the quarter, 0 .. 2^QPOS_W
  always_comb begin
    q    = quarter_e'(s2_pos[POS_W-1 -: 2]);
    m    = s2_pos[QPOS_W-1:0];
    qpos = (q == Q2 || q == Q4) ? ((QPOS_W+1)'(1) << QPOS_W) - {1'b0, m} : {1'b0, m};
  end

  always_ff @(posedge clk) begin
    neg <= (q == Q3 || q == Q4);
    if (qpos[QPOS_W]) begin
      rom_idx <= '1;
      frac    <= (FRAC_W+1)'(1) << FRAC_W;
    end else begin
      rom_idx <= qpos[QPOS_W-1:FRAC_W];
      frac    <= {1'b0, qpos[FRAC_W-1:0]};
    end
  end

  // the same component must not be issued in two consecutive cycles
  a_no_back_to_back: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && s1_valid) |-> (req_idx != s1_idx));

  initial assert (N_COMP >= 2) else $error("position_calc needs N_COMP >= 2");
endmodule
