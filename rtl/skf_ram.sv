// RAM_X / RAM_Y: agent store with a parallel-in parallel-out port.
//
// A register array of N agents by D dimensions of W bits. One whole agent
// (all D dimensions) is written per cycle through the parallel input and
// one whole agent is read per cycle through the parallel output, which is
// what lets every dimension of an agent be processed in the same clock
// cycle. RAM_X holds positions (W = 8) and RAM_Y measured values (W = 9).
// The array of registers, the N x D shape and the port names (we, w_addr,
// r_addr) are the design's; the registered read is this implementation's
// choice.
//
// Timing: write on the rising edge when we is high; read is registered,
// rdata shows the agent at r_addr one cycle after r_addr is presented.
// A read and a write of the same address in one cycle return the old data.
// The array is not reset: every agent is written before it is read.
module skf_ram #(
  parameter int N = 50,  // agents
  parameter int D = 10,  // dimensions
  parameter int W = 8,   // bits per dimension
  localparam int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] w_addr,
  input  logic [W-1:0]  wdata [D],
  input  logic [AW-1:0] r_addr,
  output logic [W-1:0]  rdata [D]
);

  logic [W-1:0] mem [N][D];

  always_ff @(posedge clk) begin
    if (we) mem[w_addr] <= wdata;
    rdata <= mem[r_addr];
  end

endmodule
