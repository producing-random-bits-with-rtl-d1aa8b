// tb_restart_analysis: the restart experiment, scaled down, run on the whole
// generator with its ring models (K = 7 source rings, f_L = 100 MHz).
//
// The generator is restarted R = 32 times and produces M = 100 bits per
// restart, every bit kept. For every bit position m the test counts the ones
// over the R restarts and computes the chi-square statistic of a fair coin,
// chi2 = D^2 / R with D = |zeros - ones|. At the 1 % level (critical value
// 6.635) a position fails when D >= 16 for R = 32. m_min is one more than the
// largest m at which positions m-2, m-1 and m all fail.
// Expected behaviour: the bits just after a restart are nearly the same in
// every restart (the rings start from identical states and jitter has not
// yet accumulated), so at least one run of three failing positions exists and
// m_min >= 3; later positions must not repeat, so m_min < M and at most a
// quarter of the positions from m_min on fail.
// The scoreboard also checks every combined bit and every byte read.
`timescale 1ns/1ps
module tb_restart_analysis;
  localparam int K = 7;
  localparam int R = 32;
  localparam int M = 100;
  localparam int D_FAIL = 16;   // smallest even D with D*D/R >= 6.635

  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_restarts = 16'(R), bits_per_restart = 16'(M);
  logic [7:0]  dec_j = 1;
  logic        busy, done, rnd_bit, rnd_valid, rd_valid, overflow;
  logic        rd_ready = 1;
  logic [7:0]  rd_data;
  logic [11:0] fifo_level;
  int checks = 0, failures = 0, done_cnt = 0;

  combined_rbg #(.K(K)) dut (.*);

  rbg_scoreboard #(.K(K), .LEVELS(2), .DEPTH(2048)) sb (
    .clk, .rst_n, .ro_en(dut.ro_en), .take(dut.u_core.take), .tree_bit(dut.u_core.tree_bit),
    .tree_in(dut.u_core.tree_in), .dec_j, .rnd_bit, .rnd_valid, .rd_data, .rd_valid, .rd_ready);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && done) done_cnt++;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int ones [M];
    bit fail [M];
    int m_min, late_fails, d;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (done_cnt == 0) @(negedge clk);
    repeat (40) @(negedge clk);
    check(sb.restart_bits.size() == R * M, $sformatf("%0d bits collected", sb.restart_bits.size()));
    check(sb.n_restarts == R, $sformatf("%0d restarts", sb.n_restarts));
    check(sb.n_bytes == R * M / 8, $sformatf("%0d bytes read", sb.n_bytes));
    for (int m = 0; m < M; m++) begin
      ones[m] = 0;
      for (int r = 0; r < R; r++) ones[m] += int'(sb.restart_bits[r * M + m]);
      d = (R - ones[m]) - ones[m];
      if (d < 0) d = -d;
      fail[m] = (d >= D_FAIL);
    end
    // positions are 1-based in m_min
    m_min = 1;
    for (int m = 2; m < M; m++)
      if (fail[m] && fail[m-1] && fail[m-2]) m_min = m + 2;
    late_fails = 0;
    for (int m = m_min - 1; m < M; m++) late_fails += int'(fail[m]);
    $display("restart analysis: R=%0d M=%0d m_min=%0d, failing positions after m_min: %0d of %0d",
             R, M, m_min, late_fails, M - m_min + 1);
    check(m_min >= 3 && m_min < M, $sformatf("m_min = %0d", m_min));
    check(late_fails * 4 <= M - m_min + 1, "positions after m_min look random");
    checks += sb.checks;
    failures += sb.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
