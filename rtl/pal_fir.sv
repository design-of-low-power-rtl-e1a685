// pal_fir: 4-tap, 8-bit, fully pipelined FIR filter built for PAL adiabatic
// logic.
//
// Structure (a systolic direct form):
//   - the sample line: x_in passes through NTAPS-1 chains of X_BUF PAL
//     buffers; tap k sees x delayed by k*X_BUF stages;
//   - every tap has a booth_multiplier (Booth array, MUL_STAGES stages, then
//     CLA, ADD_STAGES stages) that multiplies its sample by coefficient
//     coef[k] and adds the running sum from the tap before (0 for tap 0);
//   - the sum line: between adders, S_BUF PAL buffers.
// The output is the last tap's adder. All stages run on one stage clock,
// one rising edge per half power-clock cycle, and the filter takes a new
// sample on every edge (two samples per power-clock cycle).
//
// The path from x_in through tap k to y_out is
//   L_k = k*X_BUF + MUL_STAGES + ADD_STAGES + (NTAPS-1-k)*(S_BUF + ADD_STAGES)
// stages, so y(t) = sum_k coef[k] * x(t - L_k) (modulo 2^16). With the
// defaults (X_BUF 12, S_BUF 2, MUL 7, ADD 5) L_3 = 48 stages = 24 power-clock
// cycles and the taps are X_BUF-S_BUF-ADD_STAGES = 5 samples apart. Setting
// S_BUF = X_BUF - ADD_STAGES - 1 (6 with the other defaults) makes the taps
// one sample apart.
//
// Follows the document: tap count, widths, the two buffer lines and their
// depths, the multiplier and adder depths, the Booth/CLA taps, the 24-cycle
// latency and the two samples per power-clock cycle. This design's own
// choices: coefficients are input ports (MIER operand, sampled along with
// the sample they multiply), an asynchronous active-low reset, signed
// two's-complement arithmetic, wrap-around at 16 bits, and a y_valid flag
// that is x_valid delayed by L_3.
module pal_fir
  import pal_fir_pkg::*;
#(
  parameter int unsigned MUL_STAGES = MUL_STAGES_D,
  parameter int unsigned ADD_STAGES = ADD_STAGES_D,
  parameter int unsigned X_BUF      = X_BUF_D,
  parameter int unsigned S_BUF      = S_BUF_D
) (
  input  logic              clk,          // stage clock: one edge per half power-clock cycle
  input  logic              rst_n,
  input  logic              x_valid,
  input  sample_t           x_in,         // X_IN
  input  sample_t           coef [NTAPS], // A<0> .. A<3>
  output acc_t              y_out,        // OUT
  output logic              y_valid
);

  localparam int unsigned LATENCY = (NTAPS-1)*X_BUF + MUL_STAGES + ADD_STAGES;

  sample_t xd   [NTAPS];
  acc_t    prod [NTAPS];
  acc_t    sin  [NTAPS];

  assign xd[0]  = x_in;
  assign sin[0] = '0;   // the first adder's SUM_IN is tied to ground

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    if (k > 0) begin : g_lines
      pal_buffers #(.WIDTH(DATA_W), .STAGES(X_BUF)) u_xbuf (
        .clk (clk), .rst_n (rst_n), .d (xd[k-1]), .q (xd[k])
      );
      pal_buffers #(.WIDTH(PROD_W), .STAGES(S_BUF)) u_sbuf (
        .clk (clk), .rst_n (rst_n), .d (prod[k-1]), .q (sin[k])
      );
    end

    booth_multiplier #(.MUL_STAGES(MUL_STAGES), .ADD_STAGES(ADD_STAGES)) u_mac (
      .clk     (clk),
      .rst_n   (rst_n),
      .mier    (coef[k]),
      .mcand   (xd[k]),
      .sum_in  (sin[k]),
      .product (prod[k])
    );
  end

  assign y_out = prod[NTAPS-1];

  pal_buffers #(.WIDTH(1), .STAGES(LATENCY)) u_valid (
    .clk (clk), .rst_n (rst_n), .d (x_valid), .q (y_valid)
  );

endmodule
