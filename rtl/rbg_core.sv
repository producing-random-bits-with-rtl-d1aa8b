// rbg_core: the clocked part of the combined ring-oscillator random bit
// generator, between the ring oscillators and the host link.
//
// K source rings, each with a different carry-chain delay, run freely while
// ro_en is high. With PAIR_SAMPLING = 1 every source ring is first sampled by
// its own slower ring (ro_sampler_bank); with PAIR_SAMPLING = 0 the ring
// outputs go straight into the XOR tree, whose first level then samples them
// with the quartz clock. The XOR tree combines the K streams into one bit per
// clk cycle. The restart controller starts and stops all rings together and
// marks the bits that belong to each restart; the decimator keeps every j-th
// of them; the kept bits leave on rnd_bit/rnd_valid and are also packed into
// bytes in the output buffer for the host link.
//
// Interface: clk is the quartz sampling clock f_L. src_ro/smp_ro are the ring
// outputs, ro_en drives the NAND input of every ring. start, num_restarts and
// bits_per_restart start a run (one restart for on-demand generation, 2048
// restarts of 20000 bits for the restart analysis); dec_j is the decimation
// factor j (1 keeps every bit). rd_data/rd_valid/rd_ready is the byte stream
// to the host link; overflow tells that bytes were lost.
//
// Timing: each restart spends STOP_CYCLES cycles with the rings stopped,
// LEVELS cycles filling the XOR tree, then delivers one combined bit per
// cycle; a kept bit appears on rnd_bit one cycle after the tree delivers it.
//
// clear (rings stopped) resets the pair flip-flops asynchronously, because
// their clocks stop with the rings, and the decimator synchronously; both
// uses are intended.
//
// The pair sampling, the LUT-sized XOR tree, the restarts and the every-j-th
// selection follow the generator's description; the control and buffer
// details are this design's choices (see the submodules).
`timescale 1ns/1ps
module rbg_core
  import rbg_pkg::*;
#(
  parameter int unsigned K             = 15,
  parameter int unsigned N             = N_LUT,
  parameter bit          PAIR_SAMPLING = 1'b1,
  parameter int unsigned J_W           = 8,
  parameter int unsigned B_W           = 16,
  parameter int unsigned R_W           = 16,
  parameter int unsigned STOP_CYCLES   = 16,
  parameter int unsigned FIFO_DEPTH    = 2048,
  parameter int unsigned FIFO_AW       = $clog2(FIFO_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ring oscillators
  input  logic [K-1:0]         src_ro,
  input  logic [K-1:0]         smp_ro,
  output logic                 ro_en,
  // run control
  input  logic                 start,
  input  logic [R_W-1:0]       num_restarts,
  input  logic [B_W-1:0]       bits_per_restart,
  input  logic [J_W-1:0]       dec_j,
  output logic                 busy,
  output logic                 done,
  // random bits
  output logic                 rnd_bit,
  output logic                 rnd_valid,
  // host link
  output logic [7:0]           rd_data,
  output logic                 rd_valid,
  input  logic                 rd_ready,
  output logic [FIFO_AW:0]     fifo_level,
  output logic                 overflow
);

  logic [K-1:0]   tree_in;
  logic           tree_bit, tree_valid;
  logic           clear, take;

  if (PAIR_SAMPLING) begin : g_pair
    ro_sampler_bank #(.K(K)) u_smp (
      .src    (src_ro),
      .smp_clk(smp_ro),
      .clear  (clear),
      .q      (tree_in)
    );
  end else begin : g_direct
    assign tree_in = src_ro;
  end

  xor_tree #(.K(K), .N(N)) u_tree (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (ro_en),
    .src    (tree_in),
    .bit_o  (tree_bit),
    .valid_o(tree_valid)
  );

  restart_controller #(.B_W(B_W), .R_W(R_W), .STOP_CYCLES(STOP_CYCLES)) u_ctrl (
    .clk             (clk),
    .rst_n           (rst_n),
    .start           (start),
    .num_restarts    (num_restarts),
    .bits_per_restart(bits_per_restart),
    .bit_valid       (tree_valid),
    .ro_en           (ro_en),
    .clear           (clear),
    .take            (take),
    .bit_idx         (),
    .restart_idx     (),
    .busy            (busy),
    .done            (done)
  );

  bit_decimator #(.J_W(J_W)) u_dec (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .j      (dec_j),
    .bit_i  (tree_bit),
    .valid_i(take),
    .bit_o  (rnd_bit),
    .valid_o(rnd_valid)
  );

  output_buffer #(.DEPTH(FIFO_DEPTH), .AW(FIFO_AW)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .bit_i   (rnd_bit),
    .valid_i (rnd_valid),
    .rd_data (rd_data),
    .rd_valid(rd_valid),
    .rd_ready(rd_ready),
    .level   (fifo_level),
    .overflow(overflow)
  );

endmodule
