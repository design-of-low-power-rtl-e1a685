// tb_booth_multiplier: all 65536 signed operand pairs, one per clock, each
// with a random SUM_IN applied MUL_STAGES clocks after its operands (when
// the Booth array delivers them to the adder). Checks
//   product = MIER * MCAND + SUM_IN (mod 2^16)
// exactly MUL_STAGES + ADD_STAGES clocks (default 12) after the operands.
module tb_booth_multiplier;
  import pal_fir_pkg::*;

  localparam int unsigned MS = MUL_STAGES_D;
  localparam int unsigned AS = ADD_STAGES_D;
  localparam int LAT = int'(MS + AS);
  localparam int N = 65536;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] mier, mcand;
  acc_t sum_in, product;
  acc_t sin_hist [N];
  int checks = 0, failures = 0;

  booth_multiplier #(.MUL_STAGES(MS), .ADD_STAGES(AS)) dut (
    .clk(clk), .rst_n(rst_n), .mier(mier), .mcand(mcand), .sum_in(sum_in), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mier = '0; mcand = '0; sum_in = '0;
    foreach (sin_hist[i]) sin_hist[i] = PROD_W'($urandom);
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int c = 0; c < N + LAT + 2; c++) begin
      mier   = 8'(c >> 8);
      mcand  = 8'(c);
      sum_in = (c >= int'(MS) && c - int'(MS) < N) ? sin_hist[c - int'(MS)] : '0;
      #1;
      if (c >= LAT && c - LAT < N) begin
        int p;
        acc_t e;
        p = c - LAT;
        e = acc_t'(int'($signed(8'(p >> 8))) * int'($signed(8'(p))) + int'(sin_hist[p]));
        checks++;
        if (product !== e) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d: got %h exp %h", p, product, e);
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
