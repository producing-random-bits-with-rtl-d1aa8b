// tb_bit_decimator: self-checking test of the every-j-th-bit selector.
//
// Random bits are offered with random gaps for several values of j (1, 2, 10,
// 22, 72 and 0, which must act as 1). A reference counts offered bits from 1
// after each clear and expects exactly bits j, 2j, ... one cycle later. The
// number of kept bits per run is also checked against floor(offered / j).
`timescale 1ns/1ps
module tb_bit_decimator;
  localparam int JS [6] = '{1, 2, 10, 22, 72, 0};

  logic       clk = 0, rst_n = 0, clear = 0;
  logic [7:0] j;
  logic       bit_i = 0, valid_i = 0, bit_o, valid_o;
  int checks = 0, failures = 0;

  bit_decimator dut (.*);

  always #5 clk = ~clk;

  // reference state
  int  n_seen, n_kept;
  logic exp_v, exp_b;

  task automatic run(int jj, int n_offer);
    int je;
    int offered = 0;
    je = (jj == 0) ? 1 : jj;
    @(negedge clk);
    j = 8'(jj);
    clear = 1;
    valid_i = 0;
    @(negedge clk);
    clear = 0;
    n_seen = 0; n_kept = 0; exp_v = 0; exp_b = 0;
    while (offered < n_offer) begin
      valid_i = ($urandom % 4) != 0;
      bit_i   = 1'($urandom);
      @(posedge clk);
      #1;
      exp_v = 0;
      if (valid_i) begin
        n_seen++;
        offered++;
        if (n_seen % je == 0) begin exp_v = 1; exp_b = bit_i; end
      end
      checks++;
      if (valid_o !== exp_v || (exp_v && bit_o !== exp_b)) begin
        failures++;
        if (failures < 10) $display("FAIL j=%0d n=%0d: got %b/%b exp %b/%b", jj, n_seen,
                                    valid_o, bit_o, exp_v, exp_b);
      end
      if (valid_o) n_kept++;
      @(negedge clk);
    end
    valid_i = 0;
    @(posedge clk); #1;
    if (valid_o) n_kept++;
    checks++;
    if (n_kept != n_offer / je) begin
      failures++;
      $display("FAIL j=%0d: kept %0d of %0d", jj, n_kept, n_offer);
    end
  endtask

  initial begin
    j = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (JS[i]) run(JS[i], 1000);
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
