// FSM controller of the Binary SKF optimizer.
//
// Sequences one optimisation run after another through the six states of
// the design's state diagram: s0 Reset -> s1 Generate population -> s2
// Fitness evaluation and comparison -> s3 Measure -> s4 Estimate, then back
// to s2 for the next iteration, to s0 for the next run, or to s5 All runs
// complete once MAX_RUN runs of MAX_ITER iterations each are done.
//
// Every state handles one agent per cycle, all of its dimensions at once.
// s0 takes 1 cycle and clears the run's best-so-far solution. s1 takes N
// cycles and writes one random agent per cycle into RAM_X. s2, s3 and s4
// each stream the N agents through a two-stage pipeline (registered RAM
// read, registered arithmetic module) and take N + 2 cycles: the read
// address is the cycle count c, the result of agent c - 2 is written back
// (s3: RAM_Y, s4: RAM_X) or handed to the Xbest/Xtrue registers (s2). One
// iteration therefore takes 3 * (N + 2) cycles, 156 cycles for N = 50.
// The states, their order and the per-agent sequencing are the design's;
// the two-stage pipeline, and with it the N + 2 cycle count, is this
// implementation's choice.
//
// Outputs are decoded combinationally from the state and the cycle count.
// run_done pulses in the last cycle of each run (the last s4), done is high
// in s5, which is left only by rst (synchronous, active high).
module skf_ctrl
  import skf_pkg::*;
#(
  parameter int N        = 50,
  parameter int MAX_ITER = 5000,
  parameter int MAX_RUN  = 50,
  localparam int AW = (N > 1) ? $clog2(N) : 1,
  localparam int CW = $clog2(N + 2),
  localparam int IW = (MAX_ITER > 1) ? $clog2(MAX_ITER) : 1,
  localparam int RW = (MAX_RUN > 1) ? $clog2(MAX_RUN) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output state_t        state,
  output logic [IW-1:0] iter,
  output logic [RW-1:0] run,
  // RAM_X
  output logic          x_we,
  output logic          x_wsel_gen,  // 1: write RNG values, 0: estimates
  output logic [AW-1:0] x_waddr,
  output logic [AW-1:0] x_raddr,
  // RAM_Y
  output logic          y_we,
  output logic [AW-1:0] y_waddr,
  output logic [AW-1:0] y_raddr,
  // Xbest / Xtrue registers
  output logic          clear_run,
  output logic          fit_valid,
  output logic          fit_last,
  // status
  output logic          run_done,
  output logic          done
);

  localparam logic [CW-1:0] C_GEN_LAST  = CW'(N - 1);
  localparam logic [CW-1:0] C_PIPE_LAST = CW'(N + 1);

  logic [CW-1:0] cnt;
  logic          pipe_out;    // an agent leaves the pipeline this cycle
  logic          last_iter, last_run;
  logic [AW-1:0] rd_addr, wb_addr;

  assign last_iter = (iter == IW'(MAX_ITER - 1));
  assign last_run  = (run  == RW'(MAX_RUN - 1));
  assign pipe_out  = (cnt >= CW'(2));
  assign rd_addr   = (cnt < CW'(N)) ? AW'(cnt) : '0;
  assign wb_addr   = AW'(cnt - CW'(2));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S0_RESET;
      cnt   <= '0;
      iter  <= '0;
      run   <= '0;
    end else begin
      unique case (state)
        S0_RESET: begin
          iter  <= '0;
          cnt   <= '0;
          state <= S1_GENERATE;
        end
        S1_GENERATE: begin
          if (cnt == C_GEN_LAST) begin
            cnt   <= '0;
            state <= S2_EVALUATE;
          end else cnt <= cnt + 1'b1;
        end
        S2_EVALUATE: begin
          if (cnt == C_PIPE_LAST) begin
            cnt   <= '0;
            state <= S3_MEASURE;
          end else cnt <= cnt + 1'b1;
        end
        S3_MEASURE: begin
          if (cnt == C_PIPE_LAST) begin
            cnt   <= '0;
            state <= S4_ESTIMATE;
          end else cnt <= cnt + 1'b1;
        end
        S4_ESTIMATE: begin
          if (cnt == C_PIPE_LAST) begin
            cnt <= '0;
            if (!last_iter) begin
              iter  <= iter + 1'b1;
              state <= S2_EVALUATE;
            end else if (!last_run) begin
              run   <= run + 1'b1;
              state <= S0_RESET;
            end else begin
              state <= S5_COMPLETE;
            end
          end else cnt <= cnt + 1'b1;
        end
        S5_COMPLETE: state <= S5_COMPLETE;
        default:     state <= S0_RESET;
      endcase
    end
  end

  always_comb begin
    x_we       = 1'b0;
    x_wsel_gen = 1'b0;
    x_waddr    = wb_addr;
    x_raddr    = rd_addr;
    y_we       = 1'b0;
    y_waddr    = wb_addr;
    y_raddr    = rd_addr;
    clear_run  = 1'b0;
    fit_valid  = 1'b0;
    fit_last   = 1'b0;
    run_done   = 1'b0;
    done       = 1'b0;
    unique case (state)
      S0_RESET:    clear_run = 1'b1;
      S1_GENERATE: begin
        x_we       = 1'b1;
        x_wsel_gen = 1'b1;
        x_waddr    = AW'(cnt);
      end
      S2_EVALUATE: begin
        fit_valid = pipe_out;
        fit_last  = (cnt == C_PIPE_LAST);
      end
      S3_MEASURE:  y_we = pipe_out;
      S4_ESTIMATE: begin
        x_we     = pipe_out;
        run_done = (cnt == C_PIPE_LAST) && last_iter;
      end
      S5_COMPLETE: done = 1'b1;
      default: ;
    endcase
  end

  // Rules of the agent pipeline.
  // A write-back in s4 never hits the agent being read in the same cycle.
  a_no_rw_collision: assert property (@(posedge clk) disable iff (rst)
    (x_we && !x_wsel_gen && cnt < CW'(N)) |-> (x_waddr != x_raddr));
  // Every write-back address is a valid agent index.
  a_x_waddr_in_range: assert property (@(posedge clk) disable iff (rst)
    x_we |-> (int'(x_waddr) < N));
  a_y_waddr_in_range: assert property (@(posedge clk) disable iff (rst)
    y_we |-> (int'(y_waddr) < N));
  // The last fitness strobe of an evaluation is also a valid strobe.
  a_last_is_valid: assert property (@(posedge clk) disable iff (rst)
    fit_last |-> fit_valid);
  // The cycle counter never passes the longest state.
  a_cnt_bound: assert property (@(posedge clk) disable iff (rst)
    cnt <= C_PIPE_LAST);

endmodule
