// tb_restart_controller: self-checking test of the restart sequencer.
//
// A two-level delay of ro_en stands in for the XOR tree's valid flag. Three
// runs are made: 5 restarts of 40 bits with no gaps (each ring-enable pulse
// must last exactly LEVELS + 40 cycles and each stop exactly STOP_CYCLES),
// 7 restarts of 23 bits with random gaps in the valid flag (only the counts
// are checked), and a run with zero restarts (done at once). For every
// restart the test counts taken bits, checks bit_idx and restart_idx against
// its own counters, and checks that exactly one done pulse ends each run.
`timescale 1ns/1ps
module tb_restart_controller;
  localparam int STOP = 16;
  localparam int L    = 2;

  logic        clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_restarts = 0, bits_per_restart = 0;
  logic        bit_valid;
  logic        ro_en, clear, take, busy, done;
  logic [15:0] bit_idx, restart_idx;
  logic [L-1:0] vp;
  logic        gaps = 0;
  int checks = 0, failures = 0;
  int done_cnt = 0;

  always @(posedge clk) if (done) done_cnt++;

  restart_controller #(.STOP_CYCLES(STOP)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!ro_en) vp <= '0;
    else        vp <= {vp[L-2:0], 1'b1};
  end
  logic gap_r = 0;
  always @(posedge clk) #2 gap_r = gaps && ($urandom % 3 == 0);
  assign bit_valid = vp[L-1] && !gap_r;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run(int nr, int nb, bit g);
    gaps = g;
    repeat (3) @(negedge clk);
    num_restarts = 16'(nr);
    bits_per_restart = 16'(nb);
    done_cnt = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    for (int cyc = 0; cyc < 100000; cyc++) begin
      @(negedge clk);
      if (done_cnt > 0 && !busy) break;
    end
    check(done_cnt == 1, "one done pulse per run");
    repeat (3) @(negedge clk);
  endtask

  // Per-cycle monitor of a run: counts bits and checks the enable timing.
  int  m_taken = 0, m_restart = 0, m_hi = 0, m_lo = 0, m_pulses = 0;
  bit  m_gapless = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (take) begin
        check(bit_idx == 16'(m_taken), "bit_idx follows taken bits");
        check(restart_idx == 16'(m_restart), "restart_idx follows restarts");
        m_taken++;
      end
      if (ro_en) begin
        if (m_lo != 0) begin
          check(m_lo == STOP, $sformatf("stop lasted %0d cycles", m_lo));
          m_pulses++;
        end
        m_lo = 0;
        m_hi++;
      end else begin
        if (m_hi != 0) begin
          check(m_taken == int'(bits_per_restart), $sformatf("restart took %0d bits", m_taken));
          if (m_gapless) check(m_hi == L + int'(bits_per_restart),
                               $sformatf("run lasted %0d cycles", m_hi));
          m_taken = 0;
          m_restart++;
        end
        m_hi = 0;
        if (busy) m_lo++;
        else m_lo = 0;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_gapless = 1; m_restart = 0; m_pulses = 0; m_lo = 0;
    run(5, 40, 0);
    check(m_restart == 5 && m_pulses == 5, $sformatf("restarts %0d/%0d", m_restart, m_pulses));
    m_gapless = 0; m_restart = 0; m_pulses = 0; m_lo = 0;
    run(7, 23, 1);
    check(m_restart == 7 && m_pulses == 7, $sformatf("restarts %0d/%0d", m_restart, m_pulses));
    m_restart = 0; m_pulses = 0; m_lo = 0;
    run(0, 23, 0);
    check(m_restart == 0 && m_pulses == 0, "zero restarts run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
