// i2s_tx: the I2S output module: a small FIFO in front of the serializer.
//
// Runs on the audio master clock. Whenever its FIFO has room it pops the
// (first-word fall-through) source FIFO of the synthesizer, so src_rd is
// src_empty low and the FIFO not full. The serializer takes one sample per
// I2S frame from the FIFO; underflow is a sticky flag set when a frame found
// no sample. The FIFO-plus-serializer structure follows the design
// description; the FIFO depth is this implementation's choice.
module i2s_tx #(
  parameter int unsigned DW            = 25,
  parameter int unsigned FIFO_AW       = 2,
  parameter int unsigned MCLK_PER_BCLK = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          src_empty,
  input  logic [DW-1:0] src_data,
  output logic          src_rd,
  output logic          bclk,
  output logic          lrck,
  output logic          sdata,
  output logic          underflow
);
  logic          full, empty, ack, uf;
  logic [DW-1:0] head;

  assign src_rd = !src_empty && !full;

  sync_fifo #(.DW(DW), .AW(FIFO_AW)) u_fifo (
    .clk, .rst_n, .wr_en(src_rd), .wr_data(src_data), .full,
    .rd_en(ack), .rd_data(head), .empty);

  i2s_serializer #(.DW(DW), .SLOT_W(32), .MCLK_PER_BCLK(MCLK_PER_BCLK)) u_ser (
    .clk, .rst_n, .sample_valid(!empty), .sample(head), .sample_ack(ack),
    .bclk, .lrck, .sdata, .underflow(uf));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) underflow <= 1'b0; else if (uf) underflow <= 1'b1;
endmodule
