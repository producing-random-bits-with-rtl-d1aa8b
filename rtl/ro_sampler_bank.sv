// ro_sampler_bank: one D flip-flop per source ring oscillator, each clocked by
// the ring oscillator assigned to sample it.
//
// Sampling a fast, jittery ring with a much slower clock turns its phase
// noise into random bits. Here each source ring l has its own, slower
// sampling ring (ring l + 32 of the measured set), whose jitter adds to that
// of the source, instead of one quartz clock for all. q[l] is the last value
// of src[l] seen at a rising edge of smp_clk[l].
//
// Interface: src[K] are the source ring outputs, smp_clk[K] the sampling ring
// outputs, q[K] the sampled bits, each in the domain of its own sampling ring
// (the XOR tree resamples them with the quartz clock; metastability at either
// sampling point is part of the entropy source, not a fault). clear, high
// while the rings are stopped, resets all flip-flops asynchronously so that
// every restart begins from the same state.
//
// The per-source sampling ring follows the generator's description; the
// asynchronous clear is this design's choice.
`timescale 1ns/1ps
module ro_sampler_bank #(
  parameter int unsigned K = 15
) (
  input  logic [K-1:0] src,
  input  logic [K-1:0] smp_clk,
  input  logic         clear,
  output logic [K-1:0] q
);

  for (genvar i = 0; i < K; i++) begin : g_ff
    logic r;   // one variable per clock domain
    always_ff @(posedge smp_clk[i] or posedge clear) begin
      if (clear) r <= 1'b0;
      else       r <= src[i];
    end
    assign q[i] = r;
  end

endmodule
