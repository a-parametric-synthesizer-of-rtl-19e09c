// sync_fifo: single-clock FIFO at the input of the I2S module.
//
// 2^AW entries of DW bits, first-word fall-through: rd_data is the oldest
// entry whenever empty is low and rd_en removes it. A write and a read in the
// same cycle are both performed. Writes when full and reads when empty are
// ignored and flagged by assertions. Its depth is this implementation's choice.
module sync_fifo #(
  parameter int unsigned DW = 25,
  parameter int unsigned AW = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wptr, rptr;
  logic          do_wr, do_rd;

  assign full  = (wptr - rptr) == (AW+1)'(2**AW);
  assign empty = (wptr == rptr);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) if (do_wr) mem[wptr[AW-1:0]] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0; rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
