// tb_fir_sample_rates: runs the whole design at the two input rates the
// filter is aimed at, GSM (10 MS/s) and DECT (50 MS/s), one instance each,
// at default parameters. The filter takes one sample per stage clock, i.e.
// two per power-clock cycle, so the stage clocks are 10 MHz (period 100 ns,
// power clock 5 MHz) and 50 MHz (20 ns, power clock 25 MHz).
// Each instance gets an impulse followed by a full-rate random stream. The
// test measures, in nanoseconds, when each coefficient of the impulse
// reaches y_out: tap k must appear L_k = {33, 38, 43, 48} stage periods
// after the impulse, so the last at 24 power-clock cycles (4800 ns and
// 960 ns). It then checks every output of the random stream, so the
// filter is shown to keep up with a new sample every stage period.
module tb_fir_sample_rates;
  import pal_fir_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR = 2;
  localparam realtime PERIOD [NR] = '{100.0, 20.0};   // GSM, DECT stage-clock periods
  localparam string   NAME   [NR] = '{"GSM 10 MS/s", "DECT 50 MS/s"};
  localparam int      L [NTAPS]   = '{33, 38, 43, 48};
  localparam int      N = 600;

  logic    clk [NR];
  logic    rst_n = 1'b0;
  logic    x_valid [NR];
  sample_t x_in [NR];
  acc_t    y_out [NR];
  logic    y_valid [NR];
  logic    g1 [NR], g2 [NR];
  sample_t coef [NTAPS];
  int checks = 0, failures = 0;
  logic osc = 1'b0;

  always #3 osc = ~osc;

  for (genvar r = 0; r < NR; r++) begin : g_rate
    initial clk[r] = 1'b0;
    always #(PERIOD[r] / 2.0) clk[r] = ~clk[r];

    adiabatic_fir_top dut (
      .clk(clk[r]), .rst_n(rst_n), .x_valid(x_valid[r]), .x_in(x_in[r]), .coef(coef),
      .y_out(y_out[r]), .y_valid(y_valid[r]), .osc_i(osc), .gate_s2(g2[r]), .gate_s1(g1[r]));

    initial begin
      sample_t xh [N];
      realtime t_imp;
      automatic int seen = 0;
      x_valid[r] = 1'b0;
      x_in[r]    = '0;
      wait (rst_n);
      @(posedge clk[r]);
      #1;
      for (int t = 0; t < N; t++) begin
        int acc;
        xh[t] = (t == 0) ? 8'sd1 : (t < 60) ? 8'sd0 : sample_t'($urandom);
        x_in[r]    = xh[t];
        x_valid[r] = 1'b1;
        if (t == 0) t_imp = $realtime;
        #1;
        if (t < 60) begin
          // impulse response: coef[k] appears alone at L_k stage periods
          for (int k = 0; k < NTAPS; k++) begin
            if (t == L[k]) begin
              realtime dt;
              dt = $realtime - t_imp - 1.0;
              checks++;
              seen++;
              if (y_out[r] !== acc_t'(int'(coef[k])) ||
                  dt < real'(L[k]) * PERIOD[r] - 1.0 || dt > real'(L[k]) * PERIOD[r] + 1.0) begin
                failures++;
                $display("FAIL %s tap %0d: y=%h after %0t", NAME[r], k, y_out[r], dt);
              end else if (k == NTAPS - 1) begin
                $display("%s: impulse reached the output after %0.1f ns (%0d power-clock cycles)",
                         NAME[r], dt, L[k] / 2);
              end
            end
          end
        end else begin
          acc = 0;
          for (int k = 0; k < NTAPS; k++) acc += int'(coef[k]) * int'(xh[t - L[k]]);
          checks++;
          if (y_out[r] !== acc_t'(acc)) begin
            failures++;
            if (failures < 10) $display("FAIL %s t=%0d got %h exp %h", NAME[r], t, y_out[r], acc_t'(acc));
          end
        end
        @(posedge clk[r]);
        #1;
      end
      checks++;
      if (seen != NTAPS) begin
        failures++;
        $display("FAIL %s: %0d of %0d impulse taps seen", NAME[r], seen, NTAPS);
      end
      done[r] = 1'b1;
    end
  end

  logic done [NR] = '{1'b0, 1'b0};

  initial begin : watchdog
    #(real'(N + 100) * PERIOD[0]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef = '{8'sd9, -8'sd20, 8'sd33, -8'sd4};
    #250;
    rst_n = 1'b1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
