// rbg_scoreboard: reference model and checker for the whole generator, used
// by the end-to-end testbenches.
//
// It watches the sampled ring bits at the input of the XOR tree and rebuilds,
// independently of the design, what must come out:
//   combined bit    = XOR of all K sampled bits, LEVELS clock cycles later;
//   kept bits       = every j-th accepted bit of each restart (count from 1);
//   buffered bytes  = kept bits packed eight at a time, first bit in the MSB,
//                     dropped while the buffer holds DEPTH bytes.
// Each rnd_bit/rnd_valid output and each byte read from the buffer is compared
// with this reference. It also counts the events the testbench must see:
// restarts, ring bits changing, kept bits, bytes read and bytes dropped.
`timescale 1ns/1ps
module rbg_scoreboard #(
  parameter int unsigned K      = 15,
  parameter int unsigned LEVELS = 2,
  parameter int unsigned DEPTH  = 2048
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ro_en,
  input  logic         take,
  input  logic         tree_bit,
  input  logic [K-1:0] tree_in,
  input  logic [7:0]   dec_j,
  input  logic         rnd_bit,
  input  logic         rnd_valid,
  input  logic [7:0]   rd_data,
  input  logic         rd_valid,
  input  logic         rd_ready
);
  int checks = 0, failures = 0;
  int n_restarts = 0, n_taken = 0, n_kept = 0, n_bytes = 0, n_dropped = 0;
  int n_ones = 0, n_ring_bit_changes = 0;

  logic [LEVELS-1:0] pipe_b = '0, pipe_v = '0;
  logic [K-1:0] prev_in = '0;
  int           seen = 0;          // bits taken in the current restart
  bit           exp_v = 0, exp_b = 0;
  byte unsigned exp_q[$];
  byte unsigned acc = 0;
  int           nacc = 0;
  int           lvl  = 0;           // reference buffer occupancy
  bit           prev_en = 0;

  // bits taken at each position of each restart, for the restart statistics
  bit           restart_bits[$];

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endfunction

  always @(posedge clk) if (rst_n) begin
    int je;
    je = (dec_j == 0) ? 1 : int'(dec_j);
    // combined bit and decimation reference (inputs seen before this edge)
    if (take) begin
      check(tree_bit == pipe_b[LEVELS-1] && pipe_v[LEVELS-1],
            $sformatf("combined bit %b expected %b", tree_bit, pipe_b[LEVELS-1]));
      n_taken++;
      if (tree_bit) n_ones++;
      seen++;
      restart_bits.push_back(tree_bit);
    end
    // kept-bit output registered one cycle after take
    check(rnd_valid == exp_v && (!exp_v || rnd_bit == exp_b),
          $sformatf("kept bit %b/%b expected %b/%b", rnd_valid, rnd_bit, exp_v, exp_b));
    // buffer read
    if (rd_valid && rd_ready) begin
      check(exp_q.size() > 0 && rd_data == exp_q[0],
            $sformatf("byte %h expected %h", rd_data, (exp_q.size() > 0) ? exp_q[0] : 8'h0));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_bytes++;
    end
    if (rnd_valid) begin
      n_kept++;
      acc = {acc[6:0], rnd_bit};
      nacc++;
      if (nacc == 8) begin
        nacc = 0;
        if (exp_q.size() + ((rd_valid && rd_ready) ? 1 : 0) < DEPTH) exp_q.push_back(acc);
        else n_dropped++;
      end
    end
    exp_v = take && (seen % je == 0);
    exp_b = tree_bit;
    if (!ro_en) seen = 0;
    if (ro_en && !prev_en) n_restarts++;
    prev_en = ro_en;
    if (tree_in != prev_in) n_ring_bit_changes++;
    prev_in = tree_in;
    // reference tree pipeline
    if (!ro_en) begin
      pipe_b = '0;
      pipe_v = '0;
    end else begin
      pipe_b = LEVELS'({pipe_b, ^tree_in});
      pipe_v = LEVELS'({pipe_v, 1'b1});
    end
  end
endmodule
