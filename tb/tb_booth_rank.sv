// tb_booth_rank: checks the arithmetic of the first rank and of a later
// rank of the Booth array.
// With d the Booth digit of the rank's window and M the signed multiplicand,
// the carry-save pair (SUM, CRY) must satisfy, as plain integers,
//   first rank : SUM + CRY = d*M + 512
//   later rank : SUM + CRY = A + B + d*M + 384
// All windows and multiplicands are tried, with random A and B.
module tb_booth_rank;
  import pal_fir_pkg::*;

  logic [7:0] mcand;
  logic [2:0] mier;
  logic [6:0] a, b;
  logic [8:0] sum0, cry0, sum1, cry1;
  int checks = 0, failures = 0;

  booth_rank #(.FIRST(1'b1)) dut_first (.mcand(mcand), .mier(mier), .a(a), .b(b),
                                        .sum(sum0), .cry(cry0));
  booth_rank #(.FIRST(1'b0)) dut_rest  (.mcand(mcand), .mier(mier), .a(a), .b(b),
                                        .sum(sum1), .cry(cry1));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      for (int x = 0; x < 256; x++) begin
        int d, prod, got0, got1;
        mier  = 3'(m);
        mcand = 8'(x);
        a     = 7'($urandom);
        b     = 7'($urandom);
        #1;
        d    = -2 * int'(mier[2]) + int'(mier[1]) + int'(mier[0]);
        prod = d * int'($signed(mcand));
        got0 = int'(sum0) + int'(cry0);
        got1 = int'(sum1) + int'(cry1);
        checks += 2;
        if (got0 != prod + 512) begin
          failures++;
          $display("FAIL first mier=%b mcand=%0d got=%0d exp=%0d", mier, $signed(mcand), got0, prod + 512);
        end
        if (got1 != int'(a) + int'(b) + prod + 384) begin
          failures++;
          $display("FAIL rest mier=%b mcand=%0d a=%0d b=%0d got=%0d", mier, $signed(mcand), a, b, got1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
