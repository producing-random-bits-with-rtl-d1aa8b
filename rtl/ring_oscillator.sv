// ring_oscillator: behavioural model of one jittery ring oscillator whose delay
// element is a carry4 delay line, closed through a NAND gate for restarts.
//
// Simulation model of an analog timing effect, not synthesizable logic. The
// ring is a NAND gate, a carry4 delay line of TAPS taps and the routing back
// to the NAND input. With en high the NAND acts as the ring's inverter and the
// ring oscillates; with en low the NAND output is held high, the ring settles
// with every node high and osc stops at 1, so every restart starts from the
// same state.
//
// Timing: half a period is NAND_PS + TAPS * TAP_PS + the routing delay (picoseconds). On an
// FPGA the routing dominates and is set by placement; the model chooses it
// so that the ring runs at FREQ_MHZ (the frequency measured for the ring
// with this number of taps), and adds to it, on every transition, a random
// jitter with a standard deviation of JITTER_PS picoseconds (a sum of twelve
// uniform draws, close to Gaussian). Jitter accumulates, so the phase after
// a restart drifts further apart from run to run the longer the ring runs.
//
// The NAND-closed ring with a carry-chain delay follows the generator's
// description; the gate and tap delays, the jitter size and its distribution
// are this model's assumptions.
`timescale 1ps/1ps
module ring_oscillator #(
  parameter int unsigned TAPS      = 1,
  parameter int unsigned FREQ_MHZ  = 639,
  parameter int unsigned NAND_PS   = 100,
  parameter int unsigned TAP_PS    = 20,
  parameter int unsigned JITTER_PS = 3
) (
  input  logic en,
  output logic osc
);

  localparam int HALF_PS = 500_000 / FREQ_MHZ;
  localparam int WIRE_PS = (HALF_PS - int'(NAND_PS) - int'(TAPS * TAP_PS) > 1)
                         ? HALF_PS - int'(NAND_PS) - int'(TAPS * TAP_PS) : 1;

  logic nand_out;
  logic line_out;
  logic fb;
  logic [TAPS-1:0] taps_unused;

  assign #(NAND_PS) nand_out = ~(en & fb);

  carry4_delay_line #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_line (
    .in  (nand_out),
    .taps(taps_unused),
    .out (line_out)
  );

  // Routing back to the NAND input, with per-transition jitter: the sum of
  // twelve uniform draws on [0, 1) has mean 6 and standard deviation 1.
  function automatic int jitter_ps();
    int s = 0;
    for (int i = 0; i < 12; i++) s += int'($urandom % 1000);
    return ((s - 6000) * int'(JITTER_PS)) / 1000;
  endfunction

  int d_ps;
  always @(line_out) begin
    d_ps = WIRE_PS + jitter_ps();
    if (d_ps < 1) d_ps = 1;
    fb <= #(d_ps) line_out;
  end

  assign osc = fb;

endmodule
