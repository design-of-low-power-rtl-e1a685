// tb_booth_decode: exhaustive check of the radix-4 Booth recoder.
// For every 3-bit window m the Booth digit is d = -2*m[2] + m[1] + m[0];
// the test expects x1 = (|d| == 1), x2 = (|d| == 2), n[1] = m[2] and
// n[0] = ~m[2].
module tb_booth_decode;
  import pal_fir_pkg::*;

  logic [2:0]  mier;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_decode dut (.mier(mier), .ctrl(ctrl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      int d;
      mier = 3'(m);
      #1;
      d = -2 * int'(mier[2]) + int'(mier[1]) + int'(mier[0]);
      checks++;
      if (ctrl.x1 !== (d == 1 || d == -1) || ctrl.x2 !== (d == 2 || d == -2) ||
          ctrl.n[1] !== mier[2] || ctrl.n[0] !== ~mier[2]) begin
        failures++;
        $display("FAIL mier=%b d=%0d x1=%b x2=%b n=%b", mier, d, ctrl.x1, ctrl.x2, ctrl.n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
