// tb_pulse_generator: runs the gate-pulse sequencer for many power-clock
// periods with the default PERIOD 8 / PULSE_W 1 and with PERIOD 12 /
// PULSE_W 2. After reset, oscillator cycle k of period p (k counted from
// the first cycle in which a is high) must show a = (k < PULSE_W) and
// b = (PERIOD/2 <= k < PERIOD/2 + PULSE_W); a and b never both high; and
// the number of a and b pulses must match the number of periods.
module tb_pulse_generator;
  localparam int PERIODS = 200;

  logic osc = 1'b0, rst_n = 1'b0;
  logic a8, b8, a12, b12;
  int checks = 0, failures = 0;

  pulse_generator #(.PERIOD(8),  .PULSE_W(1)) dut8  (.osc_i(osc), .rst_n(rst_n), .a(a8),  .b(b8));
  pulse_generator #(.PERIOD(12), .PULSE_W(2)) dut12 (.osc_i(osc), .rst_n(rst_n), .a(a12), .b(b12));

  always #5 osc = ~osc;

  initial begin : watchdog
    repeat (PERIODS * 12 + 100) @(posedge osc);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp, int c);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s osc cycle %0d: got %b exp %b", what, c, got, exp);
    end
  endtask

  initial begin
    automatic int rises_a8 = 0, rises_b8 = 0, rises_a12 = 0, rises_b12 = 0;
    automatic logic pa8 = 0, pb8 = 0, pa12 = 0, pb12 = 0;
    repeat (2) @(posedge osc);
    #1;
    check("a idle", a8 | a12, 1'b0, -1);
    check("b idle", b8 | b12, 1'b0, -1);
    rst_n = 1'b1;
    for (int c = 0; c < PERIODS * 24; c++) begin
      int k8, k12;
      @(posedge osc);
      #1;
      k8  = c % 8;
      k12 = c % 12;
      check("a8",  a8,  k8 < 1, c);
      check("b8",  b8,  k8 >= 4 && k8 < 5, c);
      check("a12", a12, k12 < 2, c);
      check("b12", b12, k12 >= 6 && k12 < 8, c);
      check("overlap", (a8 & b8) | (a12 & b12), 1'b0, c);
      if (a8 && !pa8) rises_a8++;
      if (b8 && !pb8) rises_b8++;
      if (a12 && !pa12) rises_a12++;
      if (b12 && !pb12) rises_b12++;
      pa8 = a8; pb8 = b8; pa12 = a12; pb12 = b12;
      if (c == PERIODS * 12 - 1) break;
    end
    checks++;
    if (rises_a8 != PERIODS * 12 / 8 || rises_b8 != PERIODS * 12 / 8 ||
        rises_a12 != PERIODS || rises_b12 != PERIODS) begin
      failures++;
      $display("FAIL pulse counts %0d %0d %0d %0d", rises_a8, rises_b8, rises_a12, rises_b12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
