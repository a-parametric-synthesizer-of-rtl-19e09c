// async_fifo: dual-clock FIFO carrying output samples from the synthesizer
// clock domain to a reader on an unrelated clock.
//
// 2^AW entries of DW bits. Binary pointers with one extra wrap bit are kept in
// each domain; their Gray-coded copies cross to the other domain through
// two-flop synchronizers. full and wr_level (entries as seen from the write
// side, never less than the truth) are computed on the write side, empty on the
// read side, so both flags are conservative. The read side is first-word
// fall-through: rd_data is the oldest entry whenever rd_empty is low, and rd_en
// removes it. Writes when full and reads when empty are ignored (and flagged by
// assertions). The use of a FIFO toward unsynchronized modules follows the
// design description; its depth and structure are this implementation's.
module async_fifo #(
  parameter int unsigned DW = 25,
  parameter int unsigned AW = 4
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          wr_full,
  output logic [AW:0]   wr_level,
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          rd_empty
);
  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0] rbin_w;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write domain
  logic do_wr;
  assign do_wr = wr_en && !wr_full;
  always_ff @(posedge wr_clk) if (do_wr) mem[wbin[AW-1:0]] <= wr_data;

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  assign rbin_w   = gray2bin(rgray_w2);
  assign wr_level = wbin - rbin_w;
  assign wr_full  = (wr_level == (AW+1)'(2**AW));

  // read domain
  logic do_rd;
  assign do_rd = rd_en && !rd_empty;
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  a_no_overflow:  assert property (@(posedge wr_clk) disable iff (!wr_rst_n) !(wr_en && wr_full));
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) !(rd_en && rd_empty));
endmodule
