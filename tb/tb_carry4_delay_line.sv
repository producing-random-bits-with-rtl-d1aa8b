// tb_carry4_delay_line: self-checking test of the tapped carry-chain delay line.
//
// Lines of 1, 6, 13 and 47 taps are driven with the same square wave. For
// each line the test checks that out follows an input edge exactly
// TAPS * 20 ps later (not one picosecond earlier), and that every tap t of the
// 13-tap line switches t stage delays after the input.
`timescale 1ps/1ps
module tb_carry4_delay_line;
  localparam int TAP = 20;
  localparam int NL = 4;
  localparam int TS [NL] = '{1, 6, 13, 47};

  logic in = 0;
  logic [NL-1:0] outs;
  logic [12:0] taps13;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  for (genvar l = 0; l < NL; l++) begin : g_l
    logic [TS[l]-1:0] taps;
    carry4_delay_line #(.TAPS(TS[l]), .TAP_PS(TAP)) dut (.in, .taps, .out(outs[l]));
  end
  assign taps13 = g_l[2].taps;

  initial begin
    #3000;
    for (int n = 0; n < 8; n++) begin
      in = ~in;
      for (int l = 0; l < NL; l++) begin
        fork
          automatic int ll = l;
          begin
            #(TS[ll] * TAP - 1);
            check(outs[ll] != in, $sformatf("line %0d early", TS[ll]));
            #1;
            check(outs[ll] == in, $sformatf("line %0d late", TS[ll]));
          end
        join_none
      end
      for (int t = 1; t <= 13; t++) begin
        fork
          automatic int tt = t;
          begin
            #(tt * TAP - 1);
            check(taps13[tt-1] != in, $sformatf("tap %0d early", tt));
            #2;
            check(taps13[tt-1] == in, $sformatf("tap %0d late", tt));
          end
        join_none
      end
      #3000;
    end
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
