// tb_pal_fir: streams random 8-bit samples, one per stage clock, through
// two filters: one with the default depths (taps 5 samples apart) and one
// with S_BUF = 6 (taps one sample apart, an ordinary 4-tap FIR). For each
// it checks, every clock,
//   y(t) = sum_k coef[k] * x(t - L_k)   (mod 2^16)
//   L_k  = k*X_BUF + MUL + ADD + (3-k)*(S_BUF + ADD)
// which also pins the latency L_3 = 48 stages (24 power-clock cycles) and
// the rate of one sample per stage; and y_valid = x_valid delayed by L_3.
// Three coefficient sets are used, including -128 and 127; checks pause for
// 64 clocks after each change while the pipeline refills.
module tb_pal_fir;
  import pal_fir_pkg::*;

  localparam int N = 3000;
  localparam int SEG = 1000;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    x_valid;
  sample_t x_in;
  sample_t coef [NTAPS];
  acc_t    y_a, y_b;
  logic    v_a, v_b;
  sample_t xh [N];
  logic    vh [N];
  int checks = 0, failures = 0;

  pal_fir dut_a (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .coef(coef),
                 .y_out(y_a), .y_valid(v_a));
  pal_fir #(.S_BUF(6)) dut_b (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in),
                              .coef(coef), .y_out(y_b), .y_valid(v_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int path(int k, int sbuf);
    return k * 12 + 7 + 5 + (NTAPS - 1 - k) * (sbuf + 5);
  endfunction

  function automatic acc_t ref_y(int t, int sbuf);
    int acc = 0;
    for (int k = 0; k < NTAPS; k++) begin
      int tt = t - path(k, sbuf);
      if (tt >= 0) acc += int'(coef[k]) * int'(xh[tt]);
    end
    return acc_t'(acc);
  endfunction

  task automatic check16(string what, acc_t got, acc_t exp, int t);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s t=%0d got %h exp %h", what, t, got, exp);
    end
  endtask

  initial begin
    automatic int last_change = 0;
    x_valid = 1'b0; x_in = '0;
    coef = '{8'sd3, -8'sd7, 8'sd12, 8'sd1};
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      if (t == SEG) begin coef = '{-8'sd128, 8'sd127, -8'sd128, 8'sd127}; last_change = t; end
      if (t == 2*SEG) begin
        foreach (coef[k]) coef[k] = sample_t'($urandom);
        last_change = t;
      end
      xh[t]   = (t < 5) ? '0 : sample_t'($urandom);
      vh[t]   = (t >= 5);
      x_in    = xh[t];
      x_valid = vh[t];
      #1;
      if (t == 0 || t - last_change >= 64) begin
        check16("y default", y_a, ref_y(t, 2), t);
        check16("y S_BUF=6", y_b, ref_y(t, 6), t);
      end
      checks++;
      if (v_a !== ((t >= 48) ? vh[t-48] : 1'b0)) begin
        failures++;
        $display("FAIL y_valid t=%0d", t);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
