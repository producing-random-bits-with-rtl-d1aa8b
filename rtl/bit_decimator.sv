// bit_decimator: keeps every j-th bit of the combined random stream.
//
// Bits of a restarted generator are only unpredictable from position m_min on,
// so the output stream is made of bits j, 2j, 3j, ... (counting from 1 after
// each clear) with j >= m_min chosen at run time. j = 1 passes every bit, which
// is how raw sequences are collected for the restart analysis. j = 0 is
// treated as 1.
//
// Interface: bit_i/valid_i is the combined stream, one bit per clock at most;
// clear restarts the count (asserted while the sources are stopped, so that the
// first kept bit of every restart is bit j of that restart). bit_o/valid_o is
// registered: a kept bit appears one cycle after it was offered.
//
// Keeping every j-th bit follows the generator's description; the counter, the
// registered output and the handling of j = 0 are this design's choices.
`timescale 1ns/1ps
module bit_decimator #(
  parameter int unsigned J_W = 8    // width of the run-time decimation factor
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic [J_W-1:0] j,
  input  logic           bit_i,
  input  logic           valid_i,
  output logic           bit_o,
  output logic           valid_o
);

  logic [J_W-1:0] cnt;      // number of bits seen since the last kept bit
  logic [J_W-1:0] j_eff;
  logic           keep;

  assign j_eff = (j == '0) ? J_W'(1) : j;
  assign keep  = valid_i && (cnt == j_eff - J_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      bit_o   <= 1'b0;
      valid_o <= 1'b0;
    end else if (clear) begin
      cnt     <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= keep;
      if (keep) bit_o <= bit_i;
      if (valid_i) cnt <= keep ? '0 : cnt + J_W'(1);
    end
  end

endmodule
