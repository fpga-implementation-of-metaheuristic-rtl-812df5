// Xbest / Xtrue registers: best agent of the iteration and of the run.
//
// During fitness evaluation the agents arrive one per cycle (valid high)
// with their fitness and position. Xbest keeps the agent with the smallest
// fitness of the current iteration (minimisation, ties keep the earlier
// agent). With the last agent of the iteration (last high) the iteration's
// best is compared with Xtrue, the best-so-far solution of the run, and
// replaces it if its fitness is strictly smaller. xtrue_pos is the set of
// best_agent_D# registers that feed the measure step.
//
// Interface: clear_run (one cycle at the start of a run) sets the Xtrue
// fitness to its maximum so the first iteration always replaces it.
// The Xbest and Xtrue registers, the best_agent_D# registers and the rule
// that Xtrue is replaced only by a strictly smaller fitness are the
// design's; keeping the earlier agent on a tie and committing to Xtrue
// once per iteration, with the last agent, are this implementation's
// choice.
// Timing: Xbest and Xtrue are valid the cycle after the last agent.
module skf_best
  import skf_pkg::*;
#(
  parameter int D = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic clear_run,
  input  logic valid,
  input  logic last,
  input  fit_t fitness,
  input  pos_t pos        [D],
  output fit_t xbest_fit,
  output pos_t xbest_pos  [D],
  output fit_t xtrue_fit,
  output pos_t xtrue_pos  [D],
  output logic improved
);

  logic first;          // next valid agent is the first of an iteration
  logic cand_better;    // candidate beats the iteration best so far
  fit_t iter_fit;
  pos_t iter_pos [D];

  assign cand_better = first || (fitness < xbest_fit);

  always_comb begin
    iter_fit = cand_better ? fitness : xbest_fit;
    iter_pos = cand_better ? pos : xbest_pos;
  end

  always_ff @(posedge clk) begin
    improved <= 1'b0;
    if (rst || clear_run) begin
      first     <= 1'b1;
      xbest_fit <= '1;
      xtrue_fit <= '1;
      for (int d = 0; d < D; d++) begin
        xbest_pos[d] <= '0;
        xtrue_pos[d] <= '0;
      end
    end else if (valid) begin
      xbest_fit <= iter_fit;
      xbest_pos <= iter_pos;
      first     <= last;
      if (last && (iter_fit < xtrue_fit)) begin
        xtrue_fit <= iter_fit;
        xtrue_pos <= iter_pos;
        improved  <= 1'b1;
      end
    end
  end

endmodule
