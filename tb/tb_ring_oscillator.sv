// tb_ring_oscillator: self-checking test of the jittery carry-chain ring model.
//
// Two rings are modelled: ring 1 (1 tap, 639 MHz) and ring 33 (33 taps,
// 339 MHz), the first source ring and its sampling ring. For each the test
//  - holds en low and checks that the output settles at 1 and stays there;
//  - raises en and measures the frequency over 2 us: it must be within 1 %
//    of the target, worked out here as 1e6 / (2 * round(5e5 / f)) kHz;
//  - checks that the period varies (jitter present) but by no more than
//    a few standard deviations;
//  - restarts the ring several times and checks that the first falling edge
//    always comes one nominal half period after en rises, within the jitter.
`timescale 1ps/1ps
module tb_ring_oscillator;
  localparam int NR = 2;
  localparam int TAPS [NR] = '{1, 33};
  localparam int FREQ [NR] = '{639, 339};
  localparam int JIT = 3;

  logic en = 0;
  logic [NR-1:0] osc;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  for (genvar r = 0; r < NR; r++) begin : g_r
    ring_oscillator #(.TAPS(TAPS[r]), .FREQ_MHZ(FREQ[r]), .JITTER_PS(JIT)) dut (
      .en, .osc(osc[r]));

    int  n_rise = 0;
    longint t_last = 0, p_min = 1 << 30, p_max = 0;
    bit  measuring = 0;
    always @(posedge osc[r]) if (measuring) begin
      if (n_rise > 0) begin
        if ($time - t_last < p_min) p_min = $time - t_last;
        if ($time - t_last > p_max) p_max = $time - t_last;
      end
      t_last = $time;
      n_rise++;
    end
  end

  initial begin
    int half [NR];
    for (int r = 0; r < NR; r++) half[r] = 500000 / FREQ[r];
    // stopped
    #5000;
    check(osc == '1, "stopped ring rests at 1");
    begin
      logic [NR-1:0] o0;
      o0 = osc;
      #5000;
      check(osc == o0, "stopped ring does not move");
    end
    // running: frequency
    en = 1;
    g_r[0].measuring = 1; g_r[1].measuring = 1;
    #2000000;
    g_r[0].measuring = 0; g_r[1].measuring = 0;
    begin
      real f_meas, f_exp;
      // rising edges in the 2 us window, divided by 2 us, give MHz
      f_meas = g_r[0].n_rise / 2.0;
      f_exp  = 1.0e6 / (2.0 * half[0]);
      check(f_meas > 0.99 * f_exp && f_meas < 1.01 * f_exp,
            $sformatf("ring 1: %f MHz, expected %f", f_meas, f_exp));
      f_meas = g_r[1].n_rise / 2.0;
      f_exp  = 1.0e6 / (2.0 * half[1]);
      check(f_meas > 0.99 * f_exp && f_meas < 1.01 * f_exp,
            $sformatf("ring 33: %f MHz, expected %f", f_meas, f_exp));
      for (int r = 0; r < NR; r++) begin
        longint pmn, pmx;
        pmn = (r == 0) ? g_r[0].p_min : g_r[1].p_min;
        pmx = (r == 0) ? g_r[0].p_max : g_r[1].p_max;
        check(pmx > pmn, $sformatf("ring %0d has jitter", r));
        check(pmx - pmn < 12 * 2 * JIT, $sformatf("ring %0d jitter %0d ps too large", r, pmx - pmn));
      end
    end
    // restarts
    for (int n = 0; n < 5; n++) begin
      en = 0;
      #5000;
      check(osc == '1, "ring stops after en falls");
      en = 1;
      fork
        begin
          automatic longint t0 = $time;
          @(negedge osc[0]);
          check($time - t0 > half[0] - 6 * JIT && $time - t0 < half[0] + 6 * JIT,
                $sformatf("ring 1 first edge at %0d ps", $time - t0));
        end
        begin
          automatic longint t0 = $time;
          @(negedge osc[1]);
          check($time - t0 > half[1] - 6 * JIT && $time - t0 < half[1] + 6 * JIT,
                $sformatf("ring 33 first edge at %0d ps", $time - t0));
        end
      join
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
