// tb_booth_array: streams all 65536 signed operand pairs through the
// pipelined Booth array, one pair per clock, and checks that
//   sum_o + cry_o = MIER * MCAND + 2^15
// arrives exactly MUL_STAGES clocks after the operands (default 7).
module tb_booth_array;
  import pal_fir_pkg::*;

  localparam int unsigned MS = MUL_STAGES_D;
  localparam int N = 65536;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] mier, mcand;
  csv_t sum_o, cry_o;
  int checks = 0, failures = 0;
  int cyc = 0;

  booth_array #(.MUL_STAGES(MS)) dut (.clk(clk), .rst_n(rst_n), .mier(mier), .mcand(mcand),
                                      .sum_o(sum_o), .cry_o(cry_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operand pair number p is applied during cycle p (p = 0 .. N-1)
  function automatic int expected(int p);
    return int'($signed(8'(p >> 8))) * int'($signed(8'(p))) + 32768;
  endfunction

  initial begin
    mier = '0; mcand = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (cyc = 0; cyc < N + int'(MS) + 2; cyc++) begin
      // drive pair cyc, sample the result of pair cyc-MS (registered MS edges ago)
      mier  = 8'(cyc >> 8);
      mcand = 8'(cyc);
      #1;
      if (cyc >= int'(MS) && cyc - int'(MS) < N) begin
        checks++;
        if (int'(sum_o) + int'(cry_o) != expected(cyc - int'(MS))) begin
          failures++;
          if (failures < 10)
            $display("FAIL pair %0d: got %0d exp %0d", cyc - int'(MS),
                     int'(sum_o) + int'(cry_o), expected(cyc - int'(MS)));
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
