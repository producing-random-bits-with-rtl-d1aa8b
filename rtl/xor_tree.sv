// xor_tree: XOR-combines K source bit streams into one, one LUT level at a time.
//
// The K streams are split into groups of at most N_LUT (the inputs of one
// LUT). Each group is XORed and the result is sampled by the common clock
// clk (the quartz clock f_L), giving a new, smaller set of streams. This is
// repeated until a single stream remains, so the depth of the tree is
// LEVELS = xor_tree_levels(K, N_LUT) registers and the first combined bit
// appears LEVELS clock periods after the sources start (three periods for
// 216 sources and 6-input LUTs). Group g of a level takes streams
// g*N_LUT .. g*N_LUT+N_LUT-1 of the level below.
//
// Interface: src[K] are the source bits (already sampled, or the raw ring
// outputs when the tree itself samples them); en is high while the sources
// run. bit_o is the combined bit, valid_o marks the cycles in which bit_o
// comes from sources that were all running (en delayed by LEVELS).
//
// The grouping and per-level sampling follow the generator's description;
// clearing every level while en is low, so that each restart begins from the
// same register state, is this design's choice.
`timescale 1ns/1ps
module xor_tree
  import rbg_pkg::*;
#(
  parameter int unsigned K     = 15,
  parameter int unsigned N     = N_LUT,
  parameter int unsigned LEVELS = xor_tree_levels(K, N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [K-1:0] src,
  output logic         bit_o,
  output logic         valid_o
);

  // lvl[0] is the input set; lvl[i] (i >= 1) are the register outputs of level i.
  logic [K-1:0] lvl [LEVELS+1];

  assign lvl[0] = src;

  for (genvar lv = 0; lv < LEVELS; lv++) begin : g_level
    localparam int unsigned WIN  = xor_level_width(K, N, lv);
    localparam int unsigned WOUT = xor_level_width(K, N, lv + 1);

    logic [WOUT-1:0] grp_xor;

    always_comb begin
      grp_xor = '0;
      for (int unsigned i = 0; i < WIN; i++) grp_xor[i / N] ^= lvl[lv][i];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   lvl[lv+1] <= '0;
      else if (!en) lvl[lv+1] <= '0;
      else          lvl[lv+1] <= {{(K-WOUT){1'b0}}, grp_xor};
    end
  end

  assign bit_o = lvl[LEVELS][0];

  // en delayed by LEVELS cycles: the output is valid once every level holds
  // data taken while the sources were running.
  logic [LEVELS-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   vpipe <= '0;
    else if (!en) vpipe <= '0;
    else          vpipe <= LEVELS'((vpipe << 1) | 1'b1);
  end
  assign valid_o = vpipe[LEVELS-1];

endmodule
