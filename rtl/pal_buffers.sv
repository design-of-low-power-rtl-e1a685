// pal_buffers: a chain of STAGES PAL buffers.
//
// In the adiabatic filter a buffer is a PAL gate with the identity function;
// each one holds its value for one half power-clock cycle, so a chain of N
// buffers delays a word by N half cycles while accepting a new word every
// half cycle. Here each buffer is one register on the stage clock `clk`
// (one rising edge per half power-clock cycle). STAGES = 0 is a plain wire.
// The asynchronous active-low reset clears every stage; the adiabatic
// circuit itself has no reset, the reset is this design's choice so that a
// simulation starts from a known state.
// Timing: q(t) = d(t - STAGES) in stage-clock cycles.
module pal_buffers #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned STAGES = 12  // 12 half-cycle buffers per tap on the sample line
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (STAGES == 0) begin : g_wire
    assign q = d;
    logic unused;
    assign unused = clk ^ rst_n;
  end else begin : g_chain
    logic [WIDTH-1:0] pipe [STAGES];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(STAGES); i++) pipe[i] <= '0;
      end else begin
        pipe[0] <= d;
        for (int i = 1; i < int'(STAGES); i++) pipe[i] <= pipe[i-1];
      end
    end

    assign q = pipe[STAGES-1];
  end

endmodule
