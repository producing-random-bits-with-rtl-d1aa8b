// tb_combined_rbg_full: one on-demand generation by the generator at its
// default configuration: K = 15 source rings with carry4 delay lines of 1..15
// taps, each sampled by its ring 32 places further in the measured set (33..47
// taps), a two-level XOR tree, f_L = 100 MHz, a 2048-byte buffer.
//
// One restart produces 880 combined bits and keeps every 22nd, the spacing
// that makes the output of a 15-ring generator at 100 MHz unpredictable.
// rbg_scoreboard checks every combined, kept and buffered bit; the test checks
// the 2-cycle tree latency, the 40 kept bits and 5 bytes, one done pulse and
// the run time: 1 start cycle + 16 stop cycles + 2 fill cycles + 880 bits.
`timescale 1ns/1ps
module tb_combined_rbg_full;
  localparam int K = 15;
  localparam int LEVELS = 2;
  localparam int NBITS = 880;
  localparam int J = 22;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_restarts = 1, bits_per_restart = 16'(NBITS);
  logic [7:0]  dec_j = 8'(J);
  logic        busy, done, rnd_bit, rnd_valid, rd_valid, overflow;
  logic        rd_ready = 1;
  logic [7:0]  rd_data;
  logic [11:0] fifo_level;
  int checks = 0, failures = 0;
  int done_cnt = 0, cycles = 0, en_cycles = 0, first_take = -1;

  combined_rbg dut (.*);

  rbg_scoreboard #(.K(K), .LEVELS(LEVELS), .DEPTH(2048)) sb (
    .clk, .rst_n, .ro_en(dut.ro_en), .take(dut.u_core.take), .tree_bit(dut.u_core.tree_bit),
    .tree_in(dut.u_core.tree_in), .dec_j, .rnd_bit, .rnd_valid, .rd_data, .rd_valid, .rd_ready);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (done) done_cnt++;
    if (busy) cycles++;
    if (dut.ro_en) begin
      en_cycles++;
      if (first_take < 0 && dut.u_core.take) first_take = en_cycles;
    end
  end

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (done_cnt == 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(done_cnt == 1, "one done pulse");
    check(dut.u_core.u_tree.LEVELS == LEVELS, "tree depth");
    check(first_take == LEVELS + 1, $sformatf("first bit after %0d cycles", first_take - 1));
    check(cycles == 16 + LEVELS + NBITS, $sformatf("run took %0d cycles", cycles));
    check(sb.n_taken == NBITS, $sformatf("%0d combined bits", sb.n_taken));
    check(sb.n_kept == NBITS / J, $sformatf("%0d kept bits", sb.n_kept));
    check(sb.n_bytes == NBITS / J / 8, $sformatf("%0d bytes read", sb.n_bytes));
    check(!overflow, "no overflow");
    check(sb.n_ring_bit_changes > 100, "sampled ring bits change");
    $display("generation: %0d combined bits, %0d kept, %0d bytes, %0d ones, %0d cycles",
             sb.n_taken, sb.n_kept, sb.n_bytes, sb.n_ones, cycles);
    checks += sb.checks;
    failures += sb.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
