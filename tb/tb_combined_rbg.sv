// tb_combined_rbg: end-to-end test of the complete generator, ring models
// included, at K = 7 source rings (two XOR levels) and f_L = 100 MHz, with a
// 32-byte buffer so that an overflow is reachable in a short run.
//
// Phases:
//  1. four restarts of 600 bits, every bit kept (the restart-analysis mode);
//  2. one restart of 900 bits keeping every 3rd bit (decimation);
//  3. one restart of 800 bits with the host not reading: the buffer fills,
//     overflows, and exactly its 32 bytes are read back afterwards.
// rbg_scoreboard checks every combined bit, every kept bit and every byte.
// The test also checks that the first combined bit of every restart comes
// LEVELS = 2 cycles after the rings start, that every run ends with one done
// pulse, that the ones are balanced (40..60 %), and that the restarted
// sequences are not copies of each other. Each mechanism (restart, ring stop,
// pair sampling, decimation, overflow) is counted and must occur.
`timescale 1ns/1ps
module tb_combined_rbg;
  localparam int K = 7;
  localparam int DEPTH = 32;
  localparam int LEVELS = 2;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_restarts = 0, bits_per_restart = 0;
  logic [7:0]  dec_j = 1;
  logic        busy, done, rnd_bit, rnd_valid, rd_valid, overflow;
  logic        rd_ready = 1;
  logic [7:0]  rd_data;
  logic [5:0]  fifo_level;
  int checks = 0, failures = 0;
  int done_cnt = 0, stops = 0, latency_checks = 0, first_take_wait = -1;

  combined_rbg #(.K(K), .FIFO_DEPTH(DEPTH)) dut (.*);

  rbg_scoreboard #(.K(K), .LEVELS(LEVELS), .DEPTH(DEPTH)) sb (
    .clk, .rst_n, .ro_en(dut.ro_en), .take(dut.u_core.take), .tree_bit(dut.u_core.tree_bit),
    .tree_in(dut.u_core.tree_in), .dec_j, .rnd_bit, .rnd_valid, .rd_data, .rd_valid, .rd_ready);

  always #5 clk = ~clk;   // f_L = 100 MHz

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n && done) done_cnt++;
  always @(negedge dut.ro_en) if (rst_n) stops++;

  // cycles from ring start to the first accepted bit
  always @(posedge clk) begin
    if (rst_n && dut.ro_en) begin
      if (first_take_wait >= 0) begin
        first_take_wait++;
        if (dut.u_core.take) begin
          latency_checks++;
          check(first_take_wait == LEVELS + 1,
                $sformatf("first bit %0d cycles after start", first_take_wait - 1));
          first_take_wait = -1;
        end
      end
    end
  end
  always @(posedge dut.ro_en) if (rst_n) first_take_wait = 0;

  task automatic run(int nr, int nb, int j);
    int d0;
    d0 = done_cnt;
    @(negedge clk);
    num_restarts = 16'(nr);
    bits_per_restart = 16'(nb);
    dec_j = 8'(j);
    start = 1;
    @(negedge clk);
    start = 0;
    while (done_cnt == d0) @(negedge clk);
    repeat (4) @(negedge clk);
    check(done_cnt == d0 + 1 && !busy, "run ends with one done pulse");
  endtask

  initial begin
    int n1, ones, diff_pos, kept0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    // 1. restart-analysis mode
    run(4, 600, 1);
    n1 = sb.restart_bits.size();
    check(n1 == 4 * 600, $sformatf("phase 1 took %0d bits", n1));
    ones = 0;
    foreach (sb.restart_bits[i]) ones += sb.restart_bits[i];
    check(ones > 0.4 * n1 && ones < 0.6 * n1, $sformatf("%0d ones in %0d bits", ones, n1));
    diff_pos = 0;
    for (int p = 0; p < 600; p++)
      for (int r = 1; r < 4; r++)
        if (sb.restart_bits[p] != sb.restart_bits[r * 600 + p]) diff_pos++;
    check(diff_pos > 150, $sformatf("restarts differ in only %0d positions", diff_pos));
    $display("phase 1: %0d ones of %0d bits, restarts differ at %0d of 1800 positions",
             ones, n1, diff_pos);
    // 2. decimation
    kept0 = sb.n_kept;
    run(1, 900, 3);
    check(sb.n_kept - kept0 == 300, $sformatf("kept %0d of 900 with j = 3", sb.n_kept - kept0));
    // 3. overflow
    repeat (20) @(negedge clk);
    check(!overflow, "no overflow before phase 3");
    rd_ready = 0;
    run(1, 800, 1);
    check(overflow, "buffer overflowed");
    check(int'(fifo_level) == DEPTH, $sformatf("buffer holds %0d bytes", fifo_level));
    kept0 = sb.n_bytes;
    rd_ready = 1;
    repeat (DEPTH + 10) @(negedge clk);
    check(sb.n_bytes - kept0 == DEPTH, "full buffer read back");
    // mechanisms
    check(sb.n_restarts == 6, $sformatf("%0d restarts", sb.n_restarts));
    check(stops == 6, $sformatf("%0d ring stops", stops));
    check(latency_checks == 6, $sformatf("%0d latency checks", latency_checks));
    check(sb.n_ring_bit_changes > 500, $sformatf("%0d sampled-bit changes", sb.n_ring_bit_changes));
    check(sb.n_dropped > 0, "bytes dropped on overflow");
    $display("mechanisms: restarts=%0d stops=%0d kept=%0d bytes=%0d dropped=%0d",
             sb.n_restarts, stops, sb.n_kept, sb.n_bytes, sb.n_dropped);
    checks += sb.checks;
    failures += sb.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
