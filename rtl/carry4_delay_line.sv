// carry4_delay_line: behavioural model of a tapped delay line built from a
// series of carry4 primitives.
//
// Simulation model of FPGA carry-chain routing, not synthesizable logic.
// ceil(TAPS/4) carry4 primitives are chained through CI, all selects high and
// all DI low, so the signal ripples up the chain one multiplexer per tap.
// Tap t (1-based) is carry output (t-1) mod 4 of primitive (t-1) div 4, and
// out is tap TAPS: ring oscillator number l of the generator uses l taps, so
// every ring gets a different delay and a different nominal frequency.
//
// Logically every tap equals in, so synthesis reduces the model to wires; only
// the delays carry meaning, and an FPGA build instantiates the vendor's carry
// primitive instead.
//
// Interface: in enters CI of the first primitive; taps[t-1] is tap t and out
// is taps[TAPS-1]. Timing: out follows in after TAPS * TAP_PS picoseconds.
//
// The use of one carry-chain tap per ring index follows the generator's
// description; the per-tap delay is an assumption of the model.
`timescale 1ps/1ps
module carry4_delay_line #(
  parameter int unsigned TAPS   = 6,
  parameter int unsigned TAP_PS = 20
) (
  input  logic            in,
  output logic [TAPS-1:0] taps,
  output logic            out
);

  localparam int unsigned NC = (TAPS + 3) / 4;

  logic [3:0] co [NC];
  logic [3:0] o_unused [NC];
  logic       chain_in [NC];

  for (genvar p = 0; p < NC; p++) begin : g_c4
    if (p == 0) begin : g_first
      assign chain_in[0] = in;
    end else begin : g_next
      assign chain_in[p] = co[p-1][3];
    end
    carry4 #(.TAP_PS(TAP_PS)) u_c4 (
      .CI    (chain_in[p]),
      .CYINIT(1'b0),
      .DI    (4'b0000),
      .S     (4'b1111),
      .CO    (co[p]),
      .O     (o_unused[p])
    );
  end

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    assign taps[t] = co[t / 4][t % 4];
  end

  assign out = taps[TAPS-1];

endmodule
