// uart_rx: receiver of the serial (RS232, 8N1) link from the computer.
//
// The line idles high. A falling edge starts a frame; the start bit is checked
// again half a bit later, then the 8 data bits (LSB first) and the stop bit are
// sampled in the middle of each bit, CLKS_PER_BIT clocks apart. After the stop
// bit, valid pulses for one cycle with the byte in data; frame_err is set with
// it when the stop bit was 0. The input passes a two-flop synchronizer first.
// The design description names the UART link only; frame format, baud rate and
// sampling scheme are this implementation's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 107   // 12.288 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [2:0]    sync;
  logic          rx, fell;

  assign rx   = sync[1];
  assign fell = sync[2] && !sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 3'b111;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync  <= {sync[1:0], rxd};
      valid <= 1'b0;
      unique case (state)
        IDLE: if (fell) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        START: if (cnt == 0) begin
          if (!rx) begin
            state <= DATA;
            cnt   <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end else begin
            state <= IDLE;   // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        DATA: if (cnt == 0) begin
          data <= {rx, data[7:1]};
          cnt  <= CW'(CLKS_PER_BIT - 1);
          if (bitn == 3'd7) state <= STOP;
          bitn <= bitn + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          valid     <= 1'b1;
          frame_err <= !rx;
          state     <= IDLE;
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end
endmodule
