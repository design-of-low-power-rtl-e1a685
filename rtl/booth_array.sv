// booth_array: pipelined signed 8x8 radix-4 Booth array (carry-save part of
// the multiplier).
//
// Four booth_rank instances: rank i looks at MIER<2i+1:2i-1> (MIER<-1> = 0)
// and adds its partial product at weight 4^i. Each rank passes SUM<8:2> and
// CRY<8:2> on to the next and retires SUM<1:0> and CRY<1:0>, so the four
// ranks deliver the 15-bit vectors sum_o and cry_o with
//   sum_o + cry_o = MIER * MCAND + 2^15        (exact, MIER and MCAND signed)
// The 2^15 is removed by the adder that follows (cla_adder).
//
// Pipelining: one register after every rank, with the operands carried
// alongside, then MUL_STAGES-4 further buffer stages. The document gives the
// multiplier 7 half-cycle PAL stages; how the gate levels are spread over
// them is not given, so the split used here (one stage per rank, the rest
// as buffers at the output) is this design's choice.
// Timing: sum_o/cry_o for operands applied at clock t appear after clock
// t+MUL_STAGES-1 (MUL_STAGES rising edges); a new pair can enter every clock.
module booth_array
  import pal_fir_pkg::*;
#(
  parameter int unsigned MUL_STAGES = MUL_STAGES_D
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] mier,   // multiplier MIER<7:0> (signed)
  input  logic [DATA_W-1:0] mcand,  // multiplicand MCAND<7:0> (signed)
  output csv_t              sum_o,  // SUM<14:0>
  output csv_t              cry_o   // CRY<14:0>
);

  // One pipeline slot: operands plus the partial carry-save state.
  typedef struct packed {
    logic [DATA_W-1:0] mier;
    logic [DATA_W-1:0] mcand;
    logic [6:0]        a;     // SUM<8:2> of the last rank
    logic [6:0]        b;     // CRY<8:2> of the last rank
    logic [7:0]        slo;   // retired SUM bits, SUM<7:0>
    logic [7:0]        clo;   // retired CRY bits, CRY<7:0>
  } slot_t;

  slot_t      st  [RANKS+1];  // st[0]: inputs, st[i+1]: register after rank i
  logic [8:0] rs  [RANKS];
  logic [8:0] rc  [RANKS];
  slot_t      nx  [RANKS];

  assign st[0] = '{mier: mier, mcand: mcand, a: '0, b: '0, slo: '0, clo: '0};

  for (genvar i = 0; i < RANKS; i++) begin : g_rank
    logic [2:0] win;
    if (i == 0) begin : g_w0
      assign win = {st[0].mier[1:0], 1'b0};
    end else begin : g_wi
      assign win = st[i].mier[2*i+1 : 2*i-1];
    end

    booth_rank #(.FIRST(i == 0)) u_rank (
      .mcand (st[i].mcand),
      .mier  (win),
      .a     (st[i].a),
      .b     (st[i].b),
      .sum   (rs[i]),
      .cry   (rc[i])
    );

    always_comb begin
      nx[i]       = st[i];
      nx[i].a     = rs[i][8:2];
      nx[i].b     = rc[i][8:2];
      nx[i].slo[2*i +: 2] = rs[i][1:0];
      nx[i].clo[2*i +: 2] = rc[i][1:0];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[i+1] <= '0;
      else        st[i+1] <= nx[i];
    end
  end

  // Final carry-save form: retired bits 7:0 and the last rank's SUM/CRY<8:2>
  // as bits 14:8.
  csv_t sum_r, cry_r;
  assign sum_r = {st[RANKS].a, st[RANKS].slo};
  assign cry_r = {st[RANKS].b, st[RANKS].clo};

  pal_buffers #(.WIDTH(2*CSV_W), .STAGES(MUL_STAGES - RANKS)) u_pad (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({sum_r, cry_r}),
    .q     ({sum_o, cry_o})
  );

  initial assert (MUL_STAGES >= MUL_STAGES_MIN)
    else $error("booth_array: MUL_STAGES must be at least %0d", MUL_STAGES_MIN);

endmodule
