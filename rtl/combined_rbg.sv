// combined_rbg: complete combined random bit generator, ring oscillators
// included.
//
// K source ring oscillators use carry-chain delay lines of 1, 2, ..., K taps,
// so that no two rings share a nominal frequency: rings with equal
// frequencies lock to each other or to a frequency injected on the supply,
// and the spread of frequencies is what resists that. Source ring l is
// sampled by its own slower ring, number l + PAIR_OFFSET of the measured set
// (delay line of l + PAIR_OFFSET taps), so the sampling instants are jittery
// too. The sampled bits are XORed in a LUT-sized registered tree clocked by
// the quartz clock, and all rings can be stopped and restarted together
// through their NAND gates. See rbg_core for the clocked part.
//
// The rings are behavioural models (ring_oscillator, built from carry4
// models) running at the frequencies measured for each tap count, so this
// module is for simulation; for an FPGA the carry4 model is replaced by the
// vendor primitive. With PAIR_SAMPLING = 0 the generator is the simpler
// variant in which the quartz clock samples the source rings directly.
//
// Interface: as rbg_core, without the ring signals. clk is f_L (100, 150 or
// 200 MHz in the measured configurations).
//
// The ring structure, the tap counts, the pairing of ring l with ring l + 32
// and K = 15 follow the generator's description; the gate, tap and jitter
// sizes of the ring model are assumptions.
`timescale 1ns/1ps
module combined_rbg
  import rbg_pkg::*;
#(
  parameter int unsigned K             = 15,
  parameter int unsigned PAIR_OFFSET   = 32,
  parameter bit          PAIR_SAMPLING = 1'b1,
  parameter int unsigned N             = N_LUT,
  parameter int unsigned TAP_PS        = 20,
  parameter int unsigned NAND_PS       = 100,
  parameter int unsigned JITTER_PS     = 3,
  parameter int unsigned J_W           = 8,
  parameter int unsigned B_W           = 16,
  parameter int unsigned R_W           = 16,
  parameter int unsigned STOP_CYCLES   = 16,
  parameter int unsigned FIFO_DEPTH    = 2048,
  parameter int unsigned FIFO_AW       = $clog2(FIFO_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [R_W-1:0]       num_restarts,
  input  logic [B_W-1:0]       bits_per_restart,
  input  logic [J_W-1:0]       dec_j,
  output logic                 busy,
  output logic                 done,
  output logic                 rnd_bit,
  output logic                 rnd_valid,
  output logic [7:0]           rd_data,
  output logic                 rd_valid,
  input  logic                 rd_ready,
  output logic [FIFO_AW:0]     fifo_level,
  output logic                 overflow
);

  if (K + (PAIR_SAMPLING ? PAIR_OFFSET : 0) > NUM_RO_TABLE) begin : g_size_error
    $error("combined_rbg: ring %0d has no measured frequency", K + PAIR_OFFSET);
  end

  logic         ro_en;
  logic [K-1:0] src_ro;
  logic [K-1:0] smp_ro;

  for (genvar l = 1; l <= K; l++) begin : g_ring
    ring_oscillator #(
      .TAPS     (l),
      .FREQ_MHZ (RO_FREQ_MHZ[l-1]),
      .NAND_PS  (NAND_PS),
      .TAP_PS   (TAP_PS),
      .JITTER_PS(JITTER_PS)
    ) u_src (
      .en (ro_en),
      .osc(src_ro[l-1])
    );

    if (PAIR_SAMPLING) begin : g_pair
      ring_oscillator #(
        .TAPS     (l + PAIR_OFFSET),
        .FREQ_MHZ (RO_FREQ_MHZ[l+PAIR_OFFSET-1]),
        .NAND_PS  (NAND_PS),
        .TAP_PS   (TAP_PS),
        .JITTER_PS(JITTER_PS)
      ) u_smp (
        .en (ro_en),
        .osc(smp_ro[l-1])
      );
    end else begin : g_nopair
      assign smp_ro[l-1] = 1'b0;
    end
  end

  rbg_core #(
    .K            (K),
    .N            (N),
    .PAIR_SAMPLING(PAIR_SAMPLING),
    .J_W          (J_W),
    .B_W          (B_W),
    .R_W          (R_W),
    .STOP_CYCLES  (STOP_CYCLES),
    .FIFO_DEPTH   (FIFO_DEPTH),
    .FIFO_AW      (FIFO_AW)
  ) u_core (
    .clk, .rst_n,
    .src_ro, .smp_ro, .ro_en,
    .start, .num_restarts, .bits_per_restart, .dec_j, .busy, .done,
    .rnd_bit, .rnd_valid,
    .rd_data, .rd_valid, .rd_ready, .fifo_level, .overflow
  );

endmodule
