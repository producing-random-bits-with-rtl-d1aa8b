// tb_xor_tree: self-checking test of the registered XOR combining tree.
//
// Four trees are built at once (K = 15, 216, 7 and 1 sources, 6-input groups).
// Each is compared, cycle by cycle, against a reference that XORs all K source
// bits at once and delays the result by the expected depth: 2, 3, 2 and 1
// levels. The 216-source tree checks the three-period latency of a full
// three-level tree. The enable is dropped now and then to check that the
// pipeline clears and that valid_o comes back exactly LEVELS cycles later.
`timescale 1ns/1ps
module tb_xor_tree;
  localparam int NC = 4;
  localparam int unsigned KS     [NC] = '{15, 216, 7, 1};
  localparam int unsigned EXP_LV [NC] = '{2, 3, 2, 1};
  localparam int CYCLES = 3000;

  logic clk = 0;
  logic rst_n = 0;
  logic en = 0;
  int   checks = 0;
  int   failures = 0;
  int   cyc = 0;
  int   valid_rises = 0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_c
    localparam int unsigned K = KS[c];
    localparam int unsigned L = EXP_LV[c];
    logic [K-1:0] src;
    logic         bo, vo;
    logic [L-1:0] m_bit, m_val;

    xor_tree #(.K(K)) dut (.clk, .rst_n, .en, .src, .bit_o(bo), .valid_o(vo));

    initial begin
      src   = '0;
      m_bit = '0;
      m_val = '0;
      if (dut.LEVELS != L) begin
        $display("FAIL K=%0d: LEVELS=%0d expected %0d", K, dut.LEVELS, L);
        failures++;
      end
      checks++;
    end

    // Reference: full XOR of the sampled sources, delayed by L registers.
    always @(posedge clk) begin
      if (!rst_n || !en) begin
        m_bit <= '0;
        m_val <= '0;
      end else begin
        m_bit <= L'({m_bit, ^src});
        m_val <= L'({m_val, 1'b1});
      end
    end

    always @(negedge clk) begin
      if (rst_n) begin
        checks++;
        if (bo !== m_bit[L-1] || vo !== m_val[L-1]) begin
          failures++;
          if (failures < 10)
            $display("FAIL K=%0d cyc=%0d bit=%b/%b valid=%b/%b", K, cyc, bo, m_bit[L-1],
                     vo, m_val[L-1]);
        end
      end
      for (int i = 0; i < K; i++) src[i] = 1'($urandom);
    end
  end

  always @(posedge g_c[1].vo) valid_rises++;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      if (cyc % 97 < 4) en = 0;
      else en = 1;
    end
    checks++;
    if (valid_rises < 10) begin
      failures++;
      $display("FAIL: valid rose only %0d times", valid_rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((CYCLES + 100) * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
