// adiabatic_fir_top: the digital part of the adiabatic FIR filter system.
//
// Two parts side by side, as in the system they come from:
//   - pal_fir: the 4-tap 8-bit pipelined filter, run by the stage clock
//     `clk` (one rising edge per half power-clock cycle);
//   - pulse_generator: the sequencer of the resonant power-clock supply,
//     run by the ring oscillator output `osc_i`. Its pulses leave the chip
//     as gate_s2 (signal a) and gate_s1 (signal b) for the gate drivers of
//     the power switches S2 and S1.
// The ring oscillator, the gate drivers, the switches, the inductor and
// the DC supplies are analog and are outside this RTL: their signals are
// the ports osc_i, gate_s1 and gate_s2. In the real circuit the power clock
// they produce is what `clk` stands for; here the two clocks are separate
// inputs and unrelated.
// Parameters are those of pal_fir and pulse_generator, with their defaults.
module adiabatic_fir_top
  import pal_fir_pkg::*;
#(
  parameter int unsigned MUL_STAGES = MUL_STAGES_D,
  parameter int unsigned ADD_STAGES = ADD_STAGES_D,
  parameter int unsigned X_BUF      = X_BUF_D,
  parameter int unsigned S_BUF      = S_BUF_D,
  parameter int unsigned PG_PERIOD  = 8,
  parameter int unsigned PG_PULSE_W = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  sample_t x_in,
  input  sample_t coef [NTAPS],
  output acc_t    y_out,
  output logic    y_valid,
  input  logic    osc_i,
  output logic    gate_s2,
  output logic    gate_s1
);

  pal_fir #(
    .MUL_STAGES (MUL_STAGES),
    .ADD_STAGES (ADD_STAGES),
    .X_BUF      (X_BUF),
    .S_BUF      (S_BUF)
  ) u_fir (
    .clk     (clk),
    .rst_n   (rst_n),
    .x_valid (x_valid),
    .x_in    (x_in),
    .coef    (coef),
    .y_out   (y_out),
    .y_valid (y_valid)
  );

  pulse_generator #(.PERIOD(PG_PERIOD), .PULSE_W(PG_PULSE_W)) u_pulse (
    .osc_i (osc_i),
    .rst_n (rst_n),
    .a     (gate_s2),
    .b     (gate_s1)
  );

endmodule
