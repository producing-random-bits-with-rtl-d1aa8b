// carry4: behavioural model of the 4-bit fast carry-chain primitive of a
// Virtex-5 slice, with a propagation delay on every stage.
//
// This is a simulation model of a fixed FPGA resource, not logic to be
// synthesized: in a real design the vendor primitive is instantiated instead.
// The chain is four multiplexers and four XOR gates. Stage i passes the carry
// from the stage below when its select S[i] is high and takes DI[i] otherwise:
//   CO[i] = S[i] ? c[i] : DI[i],   O[i] = S[i] ^ c[i],
// with c[0] = CI | CYINIT and c[i] = CO[i-1]. With S = 4'b1111 the primitive
// is a delay line: CO[0..3] are copies of CI delayed by 1..4 stage delays, and
// chaining primitives through CI gives longer lines.
//
// Timing: every multiplexer adds TAP_PS picoseconds (and every XOR as much) of inertial
// delay. The four-mux-and-XOR structure follows the generator's description;
// the stage delay, and the OR of CI and CYINIT (the hardware uses one or the
// other), are this model's own assumptions.
`timescale 1ps/1ps
module carry4 #(
  parameter int unsigned TAP_PS = 20
) (
  input  logic       CI,
  input  logic       CYINIT,
  input  logic [3:0] DI,
  input  logic [3:0] S,
  output logic [3:0] CO,
  output logic [3:0] O
);

  logic cin;
  logic c_o [4];   // one variable per stage keeps the chain free of false loops

  assign cin = CI | CYINIT;

  for (genvar i = 0; i < 4; i++) begin : g_stage
    if (i == 0) begin : g_first
      assign #(TAP_PS) c_o[0] = S[0] ? cin : DI[0];
      assign #(TAP_PS) O[0]   = S[0] ^ cin;
    end else begin : g_next
      assign #(TAP_PS) c_o[i] = S[i] ? c_o[i-1] : DI[i];
      assign #(TAP_PS) O[i]   = S[i] ^ c_o[i-1];
    end
    assign CO[i] = c_o[i];
  end

endmodule
