// uart_tx_model: testbench sender for the serial parameter link.
// send_byte drives one 8N1 frame (LSB first) on txd, CPB clocks per bit;
// send_param sends one five-byte parameter command (header 0x80|sel,
// component index, 24-bit value MSB first); send_bad_stop sends a frame with
// a framing error.
module uart_tx_model #(
  parameter int CPB = 107
) (
  input  logic clk,
  output logic txd
);
  initial txd = 1'b1;

  task automatic send_byte(logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      txd = fr[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  // A frame whose stop bit is 0 (framing error), then the line returns high.
  task automatic send_bad_stop(logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b0, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      txd = fr[i];
      repeat (CPB) @(posedge clk);
    end
    txd = 1'b1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  task automatic send_param(int sel, int idx, int val);
    send_byte(8'(8'h80 | sel));
    send_byte(8'(idx));
    send_byte(8'(val >> 16));
    send_byte(8'(val >> 8));
    send_byte(8'(val));
  endtask
endmodule
