// restart_controller: stops and restarts all ring oscillators of the generator
// from identical initial conditions and counts the bits of each restart.
//
// Every ring oscillator is closed through a NAND gate whose second input is
// ro_en. With ro_en low each ring stops in a fixed state; raising it starts all
// rings at the same instant. One run, started by a pulse on start, is made of
// num_restarts restarts. Each restart holds ro_en low for STOP_CYCLES clocks
// (rings settle, the sampling registers and XOR tree are cleared), then raises
// it and accepts bits_per_restart valid bits from the XOR tree before stopping
// the rings again. For the restart analysis the run is 2048 restarts of 20000
// bits each; on-demand generation is one restart of the bits needed, so the
// rings run only while bits are wanted.
//
// Interface: bit_valid is the XOR tree's valid flag; take marks the bits that
// belong to the current restart (the tree's bits after the count is reached
// are dropped). clear is high whenever the rings are stopped. bit_idx and
// restart_idx give the position of the bit under take; done pulses for one
// cycle at the end of a run; busy is high from start to done. Inputs of zero
// restarts or zero bits end the run at once.
//
// Timing: a restart takes STOP_CYCLES + LEVELS + bits_per_restart clock cycles,
// LEVELS being the XOR tree depth.
//
// Restarting the rings through NAND gates from a common signal follows the
// generator's description; the state machine, the settling time and the run
// counters are this design's choices.
`timescale 1ns/1ps
module restart_controller #(
  parameter int unsigned B_W         = 16,  // width of the bit counter
  parameter int unsigned R_W         = 16,  // width of the restart counter
  parameter int unsigned STOP_CYCLES = 16   // clocks the rings stay stopped
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [R_W-1:0] num_restarts,
  input  logic [B_W-1:0] bits_per_restart,
  input  logic           bit_valid,
  output logic           ro_en,
  output logic           clear,
  output logic           take,
  output logic [B_W-1:0] bit_idx,
  output logic [R_W-1:0] restart_idx,
  output logic           busy,
  output logic           done
);

  typedef enum logic [1:0] {S_IDLE, S_STOP, S_RUN} state_t;

  localparam int unsigned SC_W = (STOP_CYCLES > 1) ? $clog2(STOP_CYCLES) : 1;

  state_t          state;
  logic [SC_W-1:0] stop_cnt;
  logic [R_W-1:0]  n_restarts_q;
  logic [B_W-1:0]  n_bits_q;

  assign ro_en = (state == S_RUN);
  assign clear = !ro_en;
  assign take  = (state == S_RUN) && bit_valid;
  assign busy  = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      stop_cnt     <= '0;
      n_restarts_q <= '0;
      n_bits_q     <= '0;
      bit_idx      <= '0;
      restart_idx  <= '0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_restarts_q <= num_restarts;
          n_bits_q     <= bits_per_restart;
          bit_idx      <= '0;
          restart_idx  <= '0;
          stop_cnt     <= '0;
          if (num_restarts == '0 || bits_per_restart == '0) done  <= 1'b1;
          else                                               state <= S_STOP;
        end
        S_STOP: begin
          stop_cnt <= stop_cnt + SC_W'(1);
          if (stop_cnt == SC_W'(STOP_CYCLES - 1)) begin
            stop_cnt <= '0;
            bit_idx  <= '0;
            state    <= S_RUN;
          end
        end
        S_RUN: if (bit_valid) begin
          bit_idx <= bit_idx + B_W'(1);
          if (bit_idx == n_bits_q - B_W'(1)) begin
            if (restart_idx == n_restarts_q - R_W'(1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              restart_idx <= restart_idx + R_W'(1);
              state       <= S_STOP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A bit is only taken while the rings run.
  a_take_running: assert property (@(posedge clk) disable iff (!rst_n) take |-> ro_en);

endmodule
