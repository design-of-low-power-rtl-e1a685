// booth_multiplier: signed 8x8 radix-4 Booth multiply-accumulate,
//   product = MIER * MCAND + SUM_IN   (modulo 2^16)
//
// A booth_array reduces the four Booth partial products to carry-save SUM
// and CRY vectors; a cla_adder adds them and SUM_IN. SUM_IN enters the adder
// directly, so it is sampled MUL_STAGES clocks after the operands it is
// added to. This is the multiply-accumulate unit of every filter tap; the
// split into a Booth array and a CLA with a SUM_IN input follows the
// document, the stage depths default to its 7 (array) and 5 (adder)
// half-cycle PAL stages.
// Timing: MIER/MCAND at clock t and SUM_IN at clock t+MUL_STAGES give
// product after clock t+MUL_STAGES+ADD_STAGES-1, i.e. a latency of
// MUL_STAGES+ADD_STAGES clocks; one new operation per clock.
module booth_multiplier
  import pal_fir_pkg::*;
#(
  parameter int unsigned MUL_STAGES = MUL_STAGES_D,
  parameter int unsigned ADD_STAGES = ADD_STAGES_D
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] mier,
  input  logic [DATA_W-1:0] mcand,
  input  acc_t              sum_in,
  output acc_t              product
);

  csv_t sum_v, cry_v;

  booth_array #(.MUL_STAGES(MUL_STAGES)) u_array (
    .clk   (clk),
    .rst_n (rst_n),
    .mier  (mier),
    .mcand (mcand),
    .sum_o (sum_v),
    .cry_o (cry_v)
  );

  cla_adder #(.ADD_STAGES(ADD_STAGES)) u_cla (
    .clk    (clk),
    .rst_n  (rst_n),
    .sum_i  (sum_v),
    .cry_i  (cry_v),
    .sum_in (sum_in),
    .result (product)
  );

endmodule
