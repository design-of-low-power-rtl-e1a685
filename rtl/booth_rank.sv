// booth_rank: one rank of the radix-4 Booth array.
//
// A rank recodes its three multiplier bits (booth_decode), forms a 9-bit
// partial product with nine Booth gates and adds it to the 7-bit SUM and CRY
// vectors left by the rank before. It returns 9-bit SUM and CRY vectors:
// bits 1:0 of each are retired (final bits of the product's carry-save
// form) and bits 8:2 feed the next rank as its A and B inputs.
//
// Booth gate: pp_raw = (x1 & {M7,M}) | (x2 & {M,0}); pp = n[1] ? ~pp_raw : pp_raw.
// The +1 that completes a negation enters as CRY<0> = n[1].
//
// Sign extension is handled without extending the partial products:
//   first rank (FIRST=1): SUM = {~pp[8], pp[7:0]},  CRY = {1, 7'b0, n[1]}
//   other ranks         : seven full adders add A, B and pp[6:0];
//                         SUM = {~pp[8], ~pp[7], S[6:0]}, CRY = {pp[7], C[6:0], n[1]}
// Across the four ranks these forms add a fixed 2^15 to the product, which
// the adder removes (see cla_adder). The rank structure, the 9-bit width,
// the retired bits, the first rank's Vss input and the inverters on the top
// partial-product bits follow the document's rank diagrams; the exact
// constant bits are this design's own, chosen so that the sum is exact.
// Purely combinational; no clock.
module booth_rank
  import pal_fir_pkg::*;
#(
  parameter bit FIRST = 1'b0  // 1: first rank (no A/B inputs)
) (
  input  logic [DATA_W-1:0] mcand,  // MCAND<7:0>
  input  logic [2:0]        mier,   // MIER<2:0> window of this rank
  input  logic [6:0]        a,      // SUM<8:2> of the rank before (unused if FIRST)
  input  logic [6:0]        b,      // CRY<8:2> of the rank before (unused if FIRST)
  output logic [8:0]        sum,
  output logic [8:0]        cry
);

  booth_ctrl_t ctrl;
  logic [8:0]  pp_raw, pp;
  logic [6:0]  s, c;

  booth_decode u_decode (.mier(mier), .ctrl(ctrl));

  always_comb begin
    pp_raw = ({9{ctrl.x1}} & {mcand[DATA_W-1], mcand})
           | ({9{ctrl.x2}} & {mcand, 1'b0});
    pp     = ctrl.n[1] ? ~pp_raw : pp_raw;
  end

  if (FIRST) begin : g_first
    assign s   = '0;
    assign c   = '0;
    assign sum = {~pp[8], pp[7:0]};
    assign cry = {1'b1, 7'b0, ctrl.n[1]};
    logic unused;
    assign unused = ^{a, b, s, c};
  end else begin : g_rest
    always_comb begin
      for (int j = 0; j < 7; j++) begin
        s[j] = a[j] ^ b[j] ^ pp[j];
        c[j] = (a[j] & b[j]) | (a[j] & pp[j]) | (b[j] & pp[j]);
      end
    end
    assign sum = {~pp[8], ~pp[7], s};
    assign cry = {pp[7], c, ctrl.n[1]};
  end

endmodule
