// tb_pal_buffers: random words through chains of 12 and 2 buffers (the two
// depths of the filter) and a zero-length chain; each output must equal
// the input of exactly STAGES clocks before, and zero straight after reset.
module tb_pal_buffers;
  localparam int N = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] d, q12, q2, q0;
  logic [15:0] hist [N];
  int checks = 0, failures = 0;

  pal_buffers #(.WIDTH(16), .STAGES(12)) dut12 (.clk(clk), .rst_n(rst_n), .d(d), .q(q12));
  pal_buffers #(.WIDTH(16), .STAGES(2))  dut2  (.clk(clk), .rst_n(rst_n), .d(d), .q(q2));
  pal_buffers #(.WIDTH(16), .STAGES(0))  dut0  (.clk(clk), .rst_n(rst_n), .d(d), .q(q0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp, int c);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s cycle %0d: got %h exp %h", what, c, got, exp);
    end
  endtask

  initial begin
    d = 16'hFFFF;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int c = 0; c < N; c++) begin
      hist[c] = 16'($urandom) | 16'h0001;  // never zero, so reset zeros are visible
      d = hist[c];
      #1;
      check("q0", q0, hist[c], c);
      check("q2",  q2,  (c >= 2)  ? hist[c-2]  : 16'h0, c);
      check("q12", q12, (c >= 12) ? hist[c-12] : 16'h0, c);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
