// ctrl_fsm: turns the received byte stream into writes of the three parameter
// memories.
//
// A command is five bytes: a header 0x80 | sel (sel = 0 amplitude,
// 1 frequency, 2 phase), the component index, then a 24-bit value, most
// significant byte first. When the last byte arrives the value is written, in
// the next cycle, to the memory selected by sel (we_amp / we_freq / we_phase
// for one cycle, with waddr and wdata). While waiting for a header, bytes with
// bit 7 clear and headers with sel = 3 are ignored, which lets the sender
// resynchronise. Writing the three parameter memories from the serial link
// follows the design description; the command format is this
// implementation's choice.
module ctrl_fsm
  import synth_pkg::*;
#(
  parameter int unsigned N_COMP = 256,
  localparam int unsigned KW    = (N_COMP > 1) ? $clog2(N_COMP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_valid,
  input  logic [7:0]    rx_data,
  output logic          we_amp,
  output logic          we_freq,
  output logic          we_phase,
  output logic [KW-1:0] waddr,
  output logic [23:0]   wdata
);
  typedef enum logic [2:0] {HDR, IDX, V2, V1, V0} state_e;
  state_e   state;
  par_sel_e sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= HDR;
      sel      <= SEL_AMP;
      waddr    <= '0;
      wdata    <= '0;
      we_amp   <= 1'b0;
      we_freq  <= 1'b0;
      we_phase <= 1'b0;
    end else begin
      we_amp   <= 1'b0;
      we_freq  <= 1'b0;
      we_phase <= 1'b0;
      if (rx_valid) begin
        unique case (state)
          HDR: if (rx_data[7] && rx_data[1:0] != 2'd3) begin
            sel   <= par_sel_e'(rx_data[1:0]);
            state <= IDX;
          end
          IDX: begin
            waddr <= KW'(rx_data);
            state <= V2;
          end
          V2: begin
            wdata[23:16] <= rx_data;
            state <= V1;
          end
          V1: begin
            wdata[15:8] <= rx_data;
            state <= V0;
          end
          V0: begin
            wdata[7:0] <= rx_data;
            state      <= HDR;
            we_amp     <= (sel == SEL_AMP);
            we_freq    <= (sel == SEL_FREQ);
            we_phase   <= (sel == SEL_PHASE);
          end
          default: state <= HDR;
        endcase
      end
    end
  end
endmodule
