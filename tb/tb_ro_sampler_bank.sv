// tb_ro_sampler_bank: self-checking test of the per-source sampling registers.
//
// Four sources and four sampling clocks with unrelated periods are generated.
// At every rising edge of sampling clock i the test records src[i] and checks,
// a little later, that q[i] holds it and that the other registers did not
// follow that edge. A clear pulse must force all outputs to zero at once and
// hold them while high.
`timescale 1ns/1ps
module tb_ro_sampler_bank;
  localparam int K = 4;
  logic [K-1:0] src = '0, smp_clk = '0, q;
  logic         clear = 1;
  int checks = 0, failures = 0;
  int edges [K];

  ro_sampler_bank #(.K(K)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  for (genvar i = 0; i < K; i++) begin : g_src
    // source: toggles with random spacing; sampling clock: fixed, distinct period
    initial forever #(1.0 + 0.37 * i + ($urandom % 100) / 100.0) src[i] = ~src[i];
    initial begin
      #(0.3 * i);
      forever #(7.0 + 1.3 * i) smp_clk[i] = ~smp_clk[i];
    end
    always @(posedge smp_clk[i]) begin
      logic v;
      logic [K-1:0] q_prev;
      v = src[i];
      q_prev = q;
      #0.05;
      if (!clear) begin
        edges[i]++;
        check(q[i] == v, $sformatf("q[%0d]=%b expected %b", i, q[i], v));
        for (int o = 0; o < K; o++)
          if (o != i && smp_clk[o] != 1'b1) check(q[o] == q_prev[o], "other register moved");
      end
    end
  end

  initial begin
    foreach (edges[i]) edges[i] = 0;
    #20 clear = 0;
    #2000;
    clear = 1;
    #0.05;
    check(q == '0, "clear resets all registers");
    #200;
    check(q == '0, "registers stay clear");
    clear = 0;
    #500;
    foreach (edges[i]) check(edges[i] > 50, $sformatf("clock %0d edges %0d", i, edges[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
