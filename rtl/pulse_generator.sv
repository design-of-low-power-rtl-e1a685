// pulse_generator: gate-pulse sequencer of the resonant power-clock supply.
//
// The supply is a push-pull LC resonator: switch S2 ties the power clock to
// Vss near its minimum, switch S1 to Vdd near its maximum, each for a short
// pulse, alternately, so that energy is pumped into the inductor when the
// voltage across the switch is nearly zero. This block turns the ring
// oscillator's square wave `osc_i` into those pulses:
//   a (to the gate drive of S2) is high for PULSE_W oscillator cycles at
//   the start of each power-clock period of PERIOD oscillator cycles, and
//   b (to S1) for PULSE_W cycles half a period later. a and b never overlap.
// The document gives the order and alternation of the pulses and the
// signal names (i, a, b); the ratio PERIOD, the width PULSE_W and the
// synchronous counter-based state machine (the document calls its circuit
// an asynchronous finite state machine) are this design's choices.
// Timing: a rises on the osc_i edge that starts a period; the first period
// starts on the first edge after reset is released.
module pulse_generator #(
  parameter int unsigned PERIOD  = 8,  // oscillator cycles per power-clock cycle (even, >= 4)
  parameter int unsigned PULSE_W = 1   // pulse width in oscillator cycles (< PERIOD/2)
) (
  input  logic osc_i,   // i: ring oscillator output
  input  logic rst_n,
  output logic a,       // gate pulse for S2 (pull to Vss)
  output logic b        // gate pulse for S1 (pull to Vdd)
);

  typedef enum logic [2:0] {
    S_IDLE,      // after reset, before the first period
    S_PULSE_LO,  // S2 closed: power clock held at Vss
    S_RISE,      // both open: tank swings up
    S_PULSE_HI,  // S1 closed: power clock held at Vdd
    S_FALL       // both open: tank swings down
  } state_t;

  localparam int unsigned HALF = PERIOD / 2;

  state_t                    state, state_n;
  logic [$clog2(PERIOD)-1:0] cnt, cnt_n;   // position within the period

  always_comb begin
    state_n = state;
    cnt_n   = (int'(cnt) == int'(PERIOD) - 1) ? '0 : cnt + 1'b1;
    unique case (state)
      S_IDLE: begin
        state_n = S_PULSE_LO;
        cnt_n   = '0;
      end
      S_PULSE_LO: if (int'(cnt) == int'(PULSE_W) - 1)        state_n = S_RISE;
      S_RISE:     if (int'(cnt) == int'(HALF) - 1)           state_n = S_PULSE_HI;
      S_PULSE_HI: if (int'(cnt) == int'(HALF + PULSE_W) - 1) state_n = S_FALL;
      S_FALL:     if (int'(cnt) == int'(PERIOD) - 1)         state_n = S_PULSE_LO;
      default:    state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge osc_i or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
    end
  end

  assign a = (state == S_PULSE_LO);
  assign b = (state == S_PULSE_HI);

  // The two switches must never conduct at the same time.
  a_no_overlap: assert property (@(posedge osc_i) !(a && b));

  initial assert (PERIOD >= 4 && PERIOD % 2 == 0 && PULSE_W >= 1 && PULSE_W < PERIOD / 2)
    else $error("pulse_generator: need even PERIOD >= 4 and 1 <= PULSE_W < PERIOD/2");

endmodule
