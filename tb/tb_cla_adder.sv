// tb_cla_adder: random SUM, CRY and SUM_IN, one set per clock, plus the
// extreme values; checks result = SUM + CRY + SUM_IN + 2^15 (mod 2^16)
// exactly ADD_STAGES clocks (default 5) after the inputs.
module tb_cla_adder;
  import pal_fir_pkg::*;

  localparam int unsigned AS = ADD_STAGES_D;
  localparam int N = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  csv_t sum_i, cry_i;
  acc_t sum_in, result;
  acc_t exp_q [$];
  int checks = 0, failures = 0;

  cla_adder #(.ADD_STAGES(AS)) dut (.clk(clk), .rst_n(rst_n), .sum_i(sum_i), .cry_i(cry_i),
                                    .sum_in(sum_in), .result(result));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sum_i = '0; cry_i = '0; sum_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int c = 0; c < N + int'(AS); c++) begin
      if (c < 4) begin
        sum_i  = (c[0]) ? '1 : '0;
        cry_i  = (c[1]) ? '1 : '0;
        sum_in = (c[0]) ? '1 : '0;
      end else begin
        sum_i  = CSV_W'($urandom);
        cry_i  = CSV_W'($urandom);
        sum_in = PROD_W'($urandom);
      end
      exp_q.push_back(acc_t'(32'(sum_i) + 32'(cry_i) + 32'(sum_in) + 32'h8000));
      #1;
      if (c >= int'(AS)) begin
        acc_t e;
        e = exp_q.pop_front();
        checks++;
        if (result !== e) begin
          failures++;
          if (failures < 10) $display("FAIL set %0d: got %h exp %h", c - int'(AS), result, e);
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
