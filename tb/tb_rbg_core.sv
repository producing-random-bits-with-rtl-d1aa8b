// tb_rbg_core: self-checking test of the clocked part of the generator, fed by
// simple square-wave stand-ins for the rings (fast to simulate).
//
// Two cores with K = 15 run side by side from the same controls: one samples
// each source with its own sampling clock (PAIR_SAMPLING = 1), the other feeds
// the sources straight into the XOR tree (PAIR_SAMPLING = 0). The stand-in
// rings toggle with random half periods while ro_en is high and rest at 1
// while it is low. rbg_scoreboard checks every combined, kept and buffered
// bit of both. Runs: three restarts of 500 bits keeping every bit, then one
// restart of 1000 bits keeping every 5th; the run lengths in cycles are
// checked against 16 stop + 2 fill + bits per restart.
`timescale 1ns/1ps
module tb_rbg_core;
  localparam int K = 15;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_restarts = 0, bits_per_restart = 0;
  logic [7:0]  dec_j = 1;
  logic [K-1:0] src_ro = '1, smp_ro = '1;
  logic        rd_ready = 1;
  int checks = 0, failures = 0, done_cnt = 0, busy_cycles = 0;

  logic        ro_en_p, busy_p, done_p, rb_p, rv_p, dv_p, ov_p;
  logic [7:0]  dd_p;
  logic [11:0] lvl_p;
  logic        ro_en_d, busy_d, done_d, rb_d, rv_d, dv_d, ov_d;
  logic [7:0]  dd_d;
  logic [11:0] lvl_d;

  rbg_core #(.K(K), .PAIR_SAMPLING(1'b1)) dut_p (
    .clk, .rst_n, .src_ro, .smp_ro, .ro_en(ro_en_p), .start, .num_restarts, .bits_per_restart,
    .dec_j, .busy(busy_p), .done(done_p), .rnd_bit(rb_p), .rnd_valid(rv_p), .rd_data(dd_p),
    .rd_valid(dv_p), .rd_ready, .fifo_level(lvl_p), .overflow(ov_p));
  rbg_core #(.K(K), .PAIR_SAMPLING(1'b0)) dut_d (
    .clk, .rst_n, .src_ro, .smp_ro, .ro_en(ro_en_d), .start, .num_restarts, .bits_per_restart,
    .dec_j, .busy(busy_d), .done(done_d), .rnd_bit(rb_d), .rnd_valid(rv_d), .rd_data(dd_d),
    .rd_valid(dv_d), .rd_ready, .fifo_level(lvl_d), .overflow(ov_d));

  rbg_scoreboard #(.K(K), .LEVELS(2), .DEPTH(2048)) sb_p (
    .clk, .rst_n, .ro_en(ro_en_p), .take(dut_p.take), .tree_bit(dut_p.tree_bit),
    .tree_in(dut_p.tree_in), .dec_j, .rnd_bit(rb_p), .rnd_valid(rv_p), .rd_data(dd_p),
    .rd_valid(dv_p), .rd_ready);
  rbg_scoreboard #(.K(K), .LEVELS(2), .DEPTH(2048)) sb_d (
    .clk, .rst_n, .ro_en(ro_en_d), .take(dut_d.take), .tree_bit(dut_d.tree_bit),
    .tree_in(src_ro), .dec_j, .rnd_bit(rb_d), .rnd_valid(rv_d), .rd_data(dd_d),
    .rd_valid(dv_d), .rd_ready);

  always #5 clk = ~clk;

  // stand-in rings: sources 2..4 ns half period, sampling clocks 1.3..2.3 ns
  for (genvar i = 0; i < K; i++) begin : g_ring
    initial forever begin
      #(2.0 + ($urandom % 2000) / 1000.0);
      src_ro[i] = ro_en_p ? ~src_ro[i] : 1'b1;
    end
    initial forever begin
      #(1.3 + 0.07 * i + ($urandom % 100) / 1000.0);
      smp_ro[i] = ro_en_p ? ~smp_ro[i] : 1'b1;
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) begin
    if (done_p) done_cnt++;
    if (busy_p) busy_cycles++;
    if (rst_n) begin
      checks++;
      if (ro_en_p != ro_en_d || busy_p != busy_d) begin
        failures++;
        $display("FAIL: cores out of step");
      end
    end
  end

  task automatic run(int nr, int nb, int j);
    int d0, b0;
    d0 = done_cnt;
    b0 = busy_cycles;
    @(negedge clk);
    num_restarts = 16'(nr);
    bits_per_restart = 16'(nb);
    dec_j = 8'(j);
    start = 1;
    @(negedge clk);
    start = 0;
    while (done_cnt == d0) @(negedge clk);
    repeat (4) @(negedge clk);
    check(done_cnt == d0 + 1, "one done pulse");
    check(busy_cycles - b0 == nr * (16 + 2 + nb),
          $sformatf("run took %0d cycles", busy_cycles - b0));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(3, 500, 1);
    check(sb_p.n_kept == 1500 && sb_d.n_kept == 1500, "all bits kept");
    run(1, 1000, 5);
    check(sb_p.n_kept == 1700 && sb_d.n_kept == 1700, "every 5th bit kept");
    check(sb_p.n_restarts == 4, "four restarts");
    check(sb_p.n_ring_bit_changes > 500, "sampled bits change");
    repeat (20) @(negedge clk);
    check(sb_p.n_bytes == 1700 / 8 && sb_d.n_bytes == 1700 / 8, "bytes read");
    checks += sb_p.checks + sb_d.checks;
    failures += sb_p.failures + sb_d.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
