// tb_pwm_gen: self-checking test of the PWM generator.
//
// A small instance (20-clock period, 5-bit duty so that commands above the
// period can be tried) gets random duty, direction and enable values at
// random times. A reference model checks every clock: the wave on the
// selected bridge input is high for the first min(duty, PERIOD) clocks of
// each period, duty and direction are those present at the period boundary,
// the other input stays low, and ENA follows enable one clock later. The
// period length is checked from the period_start strobe. A second instance at
// the full 2000-clock period is run for a few periods at fixed duties.
module tb_pwm_gen;

  localparam int P = 20;

  logic clk = 0, rst_n = 0;
  logic enable = 0, dir = 0;
  logic [4:0] duty = '0;
  logic ena, in1, in2, pst;
  // full-size instance
  logic [10:0] duty_f = 11'd0;
  logic ena_f, in1_f, in2_f, pst_f;

  int checks = 0, failures = 0, cycle = 0;
  int pos = -1, d_e = 0, d_f = 0, last_pst = -1, hi_f = 0, periods_f = 0;
  bit dir_e = 0, en_prev = 0, clamp_seen = 0, dir1_seen = 0, dir0_seen = 0;

  always #10 clk = ~clk;

  pwm_gen #(.PERIOD(P), .DUTY_W(5)) dut (
    .clk, .rst_n, .enable, .duty, .dir, .ena, .in1, .in2, .period_start(pst));
  pwm_gen dut_full (
    .clk, .rst_n, .enable(1'b1), .duty(duty_f), .dir(1'b0),
    .ena(ena_f), .in1(in1_f), .in2(in2_f), .period_start(pst_f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  // reference model of the small instance
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (pos >= 0) begin
        check(in1 == (en_prev && !dir_e && pos < d_e), $sformatf("IN1 at %0d (duty %0d)", pos, d_e));
        check(in2 == (en_prev &&  dir_e && pos < d_e), $sformatf("IN2 at %0d (duty %0d)", pos, d_e));
        check(ena == en_prev, "ENA");
        pos++;
      end
      if (pst) begin
        if (last_pst >= 0) check(cycle - last_pst == P, $sformatf("period %0d", cycle - last_pst));
        last_pst = cycle;
        if (pos >= 0) check(pos == P, "period_start out of step");
        pos = 0;
        d_e = (duty > P) ? P : duty;
        if (duty > P) clamp_seen = 1;
        dir_e = dir;
        if (enable && duty != 0) begin
          if (dir) dir1_seen = 1; else dir0_seen = 1;
        end
      end
      en_prev = enable;
    end
  end

  // full-size instance: count high clocks per period
  always @(posedge clk) begin
    if (rst_n) begin
      hi_f += in1_f;
      check(!in2_f, "full-size IN2 high with direction 0");
      if (pst_f) begin
        if (periods_f >= 1)
          check(hi_f == d_f, $sformatf("full-size period %0d: %0d high clocks, duty %0d",
                                       periods_f, hi_f, d_f));
        d_f = duty_f;
        periods_f++;
        hi_f = 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) duty = 5'($urandom);
      if ($urandom_range(0, 29) == 0) dir = ~dir;
      if ($urandom_range(0, 99) == 0) enable = ~enable;
      duty_f = (((i + 20) / 2000) % 2 == 0) ? 11'd1500 : 11'd1000;
    end
    repeat (2000) @(negedge clk);
    check(clamp_seen && dir0_seen && dir1_seen, "not every case exercised");
    check(periods_f >= 3, "full-size instance too few periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
