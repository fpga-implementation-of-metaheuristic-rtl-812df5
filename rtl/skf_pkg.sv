// Shared types and constants of the Binary Simulated Kalman Filter (SKF)
// optimizer.
//
// Agent positions are 8-bit two's-complement integers, as in the worked
// binary population table of the design (e.g. -11 = 11110101). Measured
// values are one bit wider (9 bits, as printed on the RAM_Y and MEASURE
// ports) because a measurement can land outside the 8-bit position range.
// Fitness values are 32-bit unsigned, the width printed on the fitness
// module output. The initial population lies in the search region
// -100..100. The six controller states follow the design's state diagram.
package skf_pkg;

  localparam int POS_W  = 8;   // agent position width
  localparam int MEAS_W = 9;   // measured value width
  localparam int FIT_W  = 32;  // sphere fitness width

  localparam int POS_MIN = -100;  // search region, lower bound
  localparam int POS_MAX = 100;   // search region, upper bound

  typedef logic signed [POS_W-1:0]  pos_t;
  typedef logic signed [MEAS_W-1:0] meas_t;
  typedef logic        [FIT_W-1:0]  fit_t;

  // s0 Reset, s1 Generate population, s2 Fitness evaluation and comparison,
  // s3 Measure, s4 Estimate, s5 All runs complete.
  typedef enum logic [2:0] {
    S0_RESET    = 3'd0,
    S1_GENERATE = 3'd1,
    S2_EVALUATE = 3'd2,
    S3_MEASURE  = 3'd3,
    S4_ESTIMATE = 3'd4,
    S5_COMPLETE = 3'd5
  } state_t;

endpackage
