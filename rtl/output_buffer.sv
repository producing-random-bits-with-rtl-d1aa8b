// output_buffer: collects the generated bits into bytes and holds them until
// the host link (a USB 2.0 bridge) reads them.
//
// Incoming bits are shifted into a byte, first bit in the most significant
// position. Each completed byte is written to a first-in first-out memory of
// DEPTH bytes. The read side is first-word-fall-through: rd_data is the oldest
// byte whenever rd_valid is high, and a cycle with rd_valid and rd_ready both
// high removes it. A byte that completes while the memory is full is dropped
// and sets the sticky overflow flag, so the host can tell that the sequence it
// received has a gap. level is the number of bytes held.
//
// A buffer between the generator and the USB link is part of the generator's
// description; its width, depth, bit order, read handshake and overflow
// handling are this design's choices. Both sides use the generator clock; a
// bridge in another clock domain needs its own clock-crossing FIFO.
`timescale 1ns/1ps
module output_buffer #(
  parameter int unsigned DEPTH = 2048,              // bytes
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_i,
  input  logic         valid_i,
  output logic [7:0]   rd_data,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [AW:0]  level,
  output logic         overflow
);

  logic [6:0]  shreg;        // the first seven bits of the byte being built
  logic [2:0]  nbits;
  logic [7:0]  mem [DEPTH];
  logic [AW:0] wptr, rptr;      // one extra bit tells full from empty
  logic        wr, rd, full;
  logic [7:0]  byte_in;

  assign byte_in = {shreg[6:0], bit_i};
  assign wr      = valid_i && (nbits == 3'd7) && !full;
  assign level   = wptr - rptr;
  assign full    = (level == (AW+1)'(DEPTH));
  assign rd_valid = (level != '0);
  assign rd       = rd_valid && rd_ready;
  assign rd_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      nbits    <= '0;
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (valid_i) begin
        shreg <= byte_in[6:0];
        nbits <= nbits + 3'd1;
        if (nbits == 3'd7 && full) overflow <= 1'b1;
      end
      if (wr) wptr <= wptr + 1'b1;
      if (rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wptr[AW-1:0]] <= byte_in;
  end

  a_no_read_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                         level <= (AW+1)'(DEPTH));

endmodule
