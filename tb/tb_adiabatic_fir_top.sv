// tb_adiabatic_fir_top: end-to-end test of the whole design at its default
// parameters (stage depths 7/5/12/2, pulse period 8, pulse width 1).
//
// Filter: 4000 random samples, one per stage clock, with gaps in x_valid,
// under four coefficient sets (small, extreme +-127/-128, all-negative
// and random). Every clock the output is compared with
//   y(t) = sum_k coef[k] * x(t - L_k) (mod 2^16),  L = {33, 38, 43, 48}
// and y_valid with x_valid delayed by 48 stages (24 power-clock cycles).
// Supply sequencer: the oscillator runs at its own rate; the test checks
// that gate_s2 and gate_s1 alternate, never overlap, and come once each
// per 8 oscillator cycles.
// It counts how often each mechanism happened and fails any that never did:
// Booth digits -2, -1, 0, +1, +2 in the coefficients in use, a wrap of the
// 16-bit accumulation, the valid flag rising and falling at the output,
// a full-rate run of 100 consecutive samples, and S1 and S2 pulses.
module tb_adiabatic_fir_top;
  import pal_fir_pkg::*;

  localparam int N   = 4000;
  localparam int SEG = 1000;
  localparam int LAT = 48;
  localparam int L [NTAPS] = '{33, 38, 43, 48};

  logic    clk = 1'b0, osc = 1'b0, rst_n = 1'b0;
  logic    x_valid;
  sample_t x_in;
  sample_t coef [NTAPS];
  acc_t    y_out;
  logic    y_valid, gate_s2, gate_s1;
  sample_t xh [N];
  logic    vh [N];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_digit [5];          // Booth digits -2..+2 seen in coefficients in use
  int n_wrap = 0, n_vrise = 0, n_vfall = 0, n_fullrate = 0, n_s1 = 0, n_s2 = 0;

  adiabatic_fir_top dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in), .coef(coef),
    .y_out(y_out), .y_valid(y_valid), .osc_i(osc), .gate_s2(gate_s2), .gate_s1(gate_s1));

  always #5 clk = ~clk;
  always #3 osc = ~osc;

  initial begin : watchdog
    repeat (N + 300) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  task automatic count_digits();
    foreach (coef[k]) begin
      logic [8:0] m;
      m = {coef[k], 1'b0};
      for (int i = 0; i < 4; i++) begin
        int d;
        d = -2 * int'(m[2*i+2]) + int'(m[2*i+1]) + int'(m[2*i]);
        n_digit[d + 2]++;
      end
    end
  endtask

  // ---- supply sequencer monitor -------------------------------------------
  int osc_cnt = 0;
  int last_s2 = -1;
  logic p_s1 = 0, p_s2 = 0;
  logic expect_s1 = 1'b0;   // after an S2 pulse the next one must be S1
  always @(posedge osc) begin
    #1;
    if (rst_n) begin
      osc_cnt++;
      checks++;
      if (gate_s1 && gate_s2) fail("gate pulses overlap");
      if (gate_s2 && !p_s2) begin
        n_s2++;
        checks++;
        if (expect_s1 && n_s2 > 1) fail("two S2 pulses without S1 between");
        if (last_s2 >= 0 && osc_cnt - last_s2 != 8) fail("S2 period is not 8 oscillator cycles");
        last_s2 = osc_cnt;
        expect_s1 = 1'b1;
      end
      if (gate_s1 && !p_s1) begin
        n_s1++;
        checks++;
        if (!expect_s1) fail("S1 pulse without S2 before it");
        if (osc_cnt - last_s2 != 4) fail("S1 pulse not half a period after S2");
        expect_s1 = 1'b0;
      end
      p_s1 = gate_s1;
      p_s2 = gate_s2;
    end
  end

  // ---- filter stimulus and checks ---------------------------------------
  initial begin
    automatic int last_change = 0, run = 0;
    automatic logic pv = 1'b0;
    foreach (n_digit[i]) n_digit[i] = 0;
    x_valid = 1'b0; x_in = '0;
    coef = '{8'sd5, -8'sd3, 8'sd2, 8'sd1};
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int t = 0; t < N; t++) begin
      int acc;
      if (t == SEG)   begin coef = '{8'sd127, -8'sd128, 8'sd127, -8'sd128}; last_change = t; end
      if (t == 2*SEG) begin coef = '{-8'sd128, -8'sd128, -8'sd128, -8'sd128}; last_change = t; end
      if (t == 3*SEG) begin
        foreach (coef[k]) coef[k] = sample_t'($urandom);
        last_change = t;
      end
      if (t == 0 || t == SEG || t == 2*SEG || t == 3*SEG) count_digits();
      // mostly full rate, with a few idle gaps
      vh[t]   = (t >= 4) && !(t % 700 >= 650 && t % 700 < 660);
      xh[t]   = !vh[t] ? '0 : (t >= 2*SEG && t < 3*SEG) ? -8'sd128 : sample_t'($urandom);
      x_in    = xh[t];
      x_valid = vh[t];
      run     = vh[t] ? run + 1 : 0;
      if (run == 100) n_fullrate++;
      #1;
      acc = 0;
      for (int k = 0; k < NTAPS; k++)
        if (t - L[k] >= 0) acc += int'(coef[k]) * int'(xh[t - L[k]]);
      if (t == 0 || t - last_change >= 64) begin
        checks++;
        if (y_out !== acc_t'(acc)) fail($sformatf("y t=%0d got %h exp %h", t, y_out, acc_t'(acc)));
        if (acc > 32767 || acc < -32768) n_wrap++;
      end
      checks++;
      if (y_valid !== ((t >= LAT) ? vh[t-LAT] : 1'b0)) fail($sformatf("y_valid t=%0d", t));
      if (y_valid && !pv) n_vrise++;
      if (!y_valid && pv) n_vfall++;
      pv = y_valid;
      @(posedge clk);
      #1;
    end

    $display("mechanisms: digit-2=%0d digit-1=%0d digit0=%0d digit+1=%0d digit+2=%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("mechanisms: wrap=%0d valid_rise=%0d valid_fall=%0d full_rate_runs=%0d s1=%0d s2=%0d",
             n_wrap, n_vrise, n_vfall, n_fullrate, n_s1, n_s2);
    foreach (n_digit[i]) begin
      checks++;
      if (n_digit[i] == 0) fail($sformatf("Booth digit %0d never used", i - 2));
    end
    checks += 6;
    if (n_wrap == 0)     fail("16-bit wrap never happened");
    if (n_vrise == 0)    fail("y_valid never rose");
    if (n_vfall == 0)    fail("y_valid never fell");
    if (n_fullrate == 0) fail("no full-rate run");
    if (n_s1 == 0)       fail("no S1 pulse");
    if (n_s2 == 0)       fail("no S2 pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
