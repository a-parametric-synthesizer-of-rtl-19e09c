// synth_pkg: widths and constants shared by the additive synthesizer.
//
// A sine period is addressed by a POS_W-bit position: the top two bits give the
// quarter (Q1..Q4), the next IDX_W bits the entry of the 512-entry quarter table
// and the low FRAC_W bits the interpolation weight between two entries.
// The 512-entry quarter table of 16-bit samples, the 24-bit interpolated
// magnitude and the 25-bit signed component and output samples follow the
// design description; the 19-bit position, 8-bit fraction and 16-bit amplitude
// are this implementation's choices.
package synth_pkg;
  localparam int unsigned ROM_AW  = 9;                  // 512 samples per quarter
  localparam int unsigned ROM_DW  = 16;                 // reference sample width
  localparam int unsigned FRAC_W  = 8;                  // interpolation weight bits
  localparam int unsigned POS_W   = 2 + ROM_AW + FRAC_W; // 19: one period = 2^19
  localparam int unsigned QPOS_W  = ROM_AW + FRAC_W;    // 17: position in a quarter
  localparam int unsigned MAG_W   = ROM_DW + FRAC_W;    // 24: interpolated magnitude
  localparam int unsigned AMP_W   = 16;                 // amplitude, unsigned fraction
  localparam int unsigned FREQ_W  = POS_W;              // phase step per output sample
  localparam int unsigned PHASE_W = POS_W;              // phase offset
  localparam int unsigned SMP_W   = MAG_W + 1;          // 25: signed sample width

  typedef logic [POS_W-1:0]   pos_t;
  typedef logic [AMP_W-1:0]   amp_t;
  typedef logic signed [SMP_W-1:0] sample_t;

  // Parameters of one component, as read from the three parameter memories.
  typedef struct packed {
    amp_t               amp;    // amplitude, amp / 2^AMP_W
    logic [FREQ_W-1:0]  freq;   // position step per output sample
    logic [PHASE_W-1:0] phase;  // position offset
  } synth_par_t;

  // Quarter of the period, from the two top position bits.
  typedef enum logic [1:0] {Q1 = 2'd0, Q2 = 2'd1, Q3 = 2'd2, Q4 = 2'd3} quarter_e;

  // Parameter selector used by the serial command protocol.
  typedef enum logic [1:0] {SEL_AMP = 2'd0, SEL_FREQ = 2'd1, SEL_PHASE = 2'd2} par_sel_e;
endpackage
