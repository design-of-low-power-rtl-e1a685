// booth_decode: radix-4 Booth recoder for one rank of the multiplier.
//
// It looks at three multiplier bits m = MIER<2i+1:2i-1> and says which
// multiple of the multiplicand the rank adds: 0, +1, +2, -1 or -2.
//   x1   = m[0] ^ m[1]                          (one times the multiplicand)
//   x2   = (m[2] & ~m[1] & ~m[0]) | (~m[2] & m[1] & m[0])  (two times)
//   n[1] = m[2]                                 (negate the selected multiple)
//   n[0] = ~m[2]                                (complement rail of n[1])
// With neither x1 nor x2 set the rank adds zero; for m = 3'b111 it still
// inverts the zero and adds one in the carry vector, which again gives zero.
// The signal names (X1, X2, N<1:0>) and the three-bit window follow the
// document's decode cell; the gate structure is left to synthesis.
// Purely combinational; no clock.
module booth_decode
  import pal_fir_pkg::*;
(
  input  logic [2:0]  mier,  // MIER<2i+1>, MIER<2i>, MIER<2i-1> (bit 0 is Vss for rank 0)
  output booth_ctrl_t ctrl
);

  always_comb begin
    ctrl.x1   = mier[0] ^ mier[1];
    ctrl.x2   = (mier[2] & ~mier[1] & ~mier[0]) | (~mier[2] & mier[1] & mier[0]);
    ctrl.n[1] = mier[2];
    ctrl.n[0] = ~mier[2];
  end

endmodule
