// tb_carry4: self-checking test of the carry-chain primitive model.
//
// Part 1 drives random CI, CYINIT, DI and S, waits for the chain to settle
// and compares CO and O with the carry-chain equations worked out in the
// test. Part 2 sets S = 1111 and DI = 0000 (delay-line use) and checks that
// an edge on CI reaches CO[i] exactly (i+1) stage delays later and not before.
`timescale 1ps/1ps
module tb_carry4;
  localparam int TAP = 20;

  logic       CI = 0, CYINIT = 0;
  logic [3:0] DI = 0, S = 0, CO, O;
  int checks = 0, failures = 0;

  carry4 #(.TAP_PS(TAP)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [3:0] eco, eo;
    logic c;
    #200;
    for (int n = 0; n < 500; n++) begin
      {CI, CYINIT, DI, S} = 10'($urandom);
      #(10 * TAP);
      c = CI | CYINIT;
      for (int i = 0; i < 4; i++) begin
        eo[i]  = S[i] ^ c;
        eco[i] = S[i] ? c : DI[i];
        c = eco[i];
      end
      check(CO == eco && O == eo, $sformatf("S=%b DI=%b CI=%b: CO=%b/%b O=%b/%b", S, DI, CI,
                                            CO, eco, O, eo));
    end
    S = 4'b1111; DI = 4'b0000; CYINIT = 0; CI = 0;
    #(10 * TAP);
    for (int n = 0; n < 6; n++) begin
      CI = ~CI;
      for (int i = 0; i < 4; i++) begin
        #(TAP - 1);
        check(CO[i] != CI, $sformatf("CO[%0d] too early", i));
        #1;
        check(CO[i] == CI, $sformatf("CO[%0d] late", i));
      end
      #(5 * TAP);
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
