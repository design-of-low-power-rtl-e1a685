// pal_fir_pkg: widths, types and default pipeline depths shared by the
// 4-tap 8-bit pipelined FIR filter and its radix-4 Booth multiply-accumulate
// units.
//
// One "stage" throughout this design is one PAL pipeline stage, which the
// adiabatic circuit evaluates in one half of a power-clock cycle. The RTL
// models every such stage as one register clocked by a stage clock that has
// one rising edge per half power-clock cycle.
//
// From the filter's description: 8-bit samples and coefficients, 16-bit
// products and sums, 4 taps, 7 stages of Booth array, 5 stages of adder,
// 12 half-cycle buffers per tap on the sample line and 2 on the sum line.
// The struct layout and names are this design's own.
package pal_fir_pkg;

  localparam int unsigned DATA_W  = 8;   // sample and coefficient width
  localparam int unsigned PROD_W  = 16;  // product / accumulated sum width
  localparam int unsigned CSV_W   = 15;  // width of the Booth array SUM and CRY vectors
  localparam int unsigned RANKS   = 4;   // Booth ranks for an 8-bit multiplier
  localparam int unsigned NTAPS   = 4;

  // Default pipeline depths, in half power-clock stages.
  localparam int unsigned MUL_STAGES_D = 7;
  localparam int unsigned ADD_STAGES_D = 5;
  localparam int unsigned X_BUF_D      = 12;
  localparam int unsigned S_BUF_D      = 2;

  // Smallest depths the pipelined logic needs: one register per Booth rank,
  // and the five steps of the carry-lookahead adder.
  localparam int unsigned MUL_STAGES_MIN = RANKS;
  localparam int unsigned ADD_STAGES_MIN = 5;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [PROD_W-1:0] acc_t;
  typedef logic        [CSV_W-1:0]  csv_t;

  // Booth control signals of one rank (names as on the decode cell).
  typedef struct packed {
    logic       x1;  // select the multiplicand once
    logic       x2;  // select the multiplicand shifted left by one
    logic [1:0] n;   // n[1]: negate (and +1 into the carry vector); n[0]: its complement
  } booth_ctrl_t;

endpackage
