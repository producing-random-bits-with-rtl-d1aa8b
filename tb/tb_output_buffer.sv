// tb_output_buffer: self-checking test of the bit-to-byte buffer.
//
// A small buffer (DEPTH = 16 bytes) is fed random bits with random gaps and
// read with a random ready. A reference queue packs the bits into bytes
// (first bit most significant) and every byte read must match it in order.
// A phase with the reader stopped fills the buffer past DEPTH: the overflow
// flag must rise, level must stop at DEPTH, and exactly the first DEPTH
// bytes must come out afterwards.
`timescale 1ns/1ps
module tb_output_buffer;
  localparam int DEPTH = 16;

  logic       clk = 0, rst_n = 0;
  logic       bit_i = 0, valid_i = 0;
  logic [7:0] rd_data;
  logic       rd_valid, rd_ready = 0;
  logic [4:0] level;
  logic       overflow;
  int checks = 0, failures = 0;
  int writes_full = 0;

  output_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  byte unsigned exp_q[$];
  logic [7:0]   acc;
  int           nacc = 0;
  bit           model_drop = 0;   // reference drops bytes while full

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // Reference model and checker, evaluated just before each rising edge.
  always @(posedge clk) if (rst_n) begin
    if (rd_valid && rd_ready) begin
      check(exp_q.size() > 0, "read from empty reference");
      if (exp_q.size() > 0) begin
        check(rd_data == exp_q[0], $sformatf("data %h exp %h", rd_data, exp_q[0]));
        void'(exp_q.pop_front());
      end
    end
    if (valid_i) begin
      acc = {acc[6:0], bit_i};
      nacc++;
      if (nacc == 8) begin
        nacc = 0;
        if (exp_q.size() < DEPTH) exp_q.push_back(acc);
        else writes_full++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // streaming phase
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      valid_i  = ($urandom % 3) != 0;
      bit_i    = 1'($urandom);
      rd_ready = ($urandom % 4) != 0;
      check(int'(level) <= DEPTH, "level within depth");
    end
    check(!overflow, "no overflow while reading");
    // fill phase: reader stopped
    rd_ready = 0;
    for (int i = 0; i < 8 * (DEPTH + 4); i++) begin
      @(negedge clk);
      valid_i = 1;
      bit_i   = 1'($urandom);
    end
    @(negedge clk);
    valid_i = 0;
    check(overflow, "overflow flag set");
    check(int'(level) == DEPTH, $sformatf("level %0d when full", level));
    check(writes_full > 0, "reference saw dropped bytes");
    // drain
    rd_ready = 1;
    repeat (DEPTH + 4) @(negedge clk);
    check(!rd_valid && exp_q.size() == 0, "drained");
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
