// tb_motor_ctrl_top: end-to-end test of the motor controller fabric at its
// default sizes (50 MHz clock, 100 kHz ADC sampling, 25 kHz PWM, 10 ms speed
// windows).
//
// The test plays the processor (Avalon-MM reads and writes), the board
// switches, the LTC2308 (behavioural model) and the motor encoder. It runs
// one complete operation: the ADC input is read and shown on the displays and
// the bus, the motor is switched on, the software sets a duty cycle, the
// rotation direction is taken first from the manual switch and then from the
// software in automatic mode, an over-range duty is clamped to full on, and
// encoder pulses at the rates of top speed, minimum speed and standstill are
// reported through the SPEED register. It checks the ADC sample rate, the
// PWM period and the speed window length, and counts how often each
// mechanism happened; one that never happened counts as a failure.
module tb_motor_ctrl_top;

  import motor_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] address = '0;
  logic chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = '0, readdata, rd;
  logic sw_on = 0, sw_auto = 0, sw_dir = 0, enc = 0;
  logic convst, sck, sdi, sdo, ena, in1, in2, adc_valid, speed_valid, pwm_period;
  logic [15:0] speed;
  logic [6:0] hex0, hex1, hex2, hex3, hex4, hex5;
  logic [7:0][11:0] vin;

  int checks = 0, failures = 0, cycle = 0;
  int last_adc = -1, last_pwm = -1, last_speed = -1;
  int n_adc = 0, n_manual = 0, n_auto = 0, n_off = 0, n_clamp = 0, n_speed = 0, n_display = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle++;

  motor_ctrl_top dut (
    .clk, .rst_n,
    .avs_address(address), .avs_chipselect(chipselect), .avs_read(read),
    .avs_write(write), .avs_writedata(writedata), .avs_readdata(readdata),
    .sw_on, .sw_auto, .sw_dir,
    .adc_convst(convst), .adc_sck(sck), .adc_sdi(sdi), .adc_sdo(sdo),
    .enc_in(enc), .motor_ena(ena), .motor_in1(in1), .motor_in2(in2),
    .hex0, .hex1, .hex2, .hex3, .hex4, .hex5,
    .adc_valid, .speed, .speed_valid, .pwm_period);

  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin);

  function automatic logic [6:0] segs(input string lit);
    logic [6:0] v = '1;
    for (int i = 0; i < lit.len(); i++) v[3'(lit[i] - "a")] = 1'b0;
    return v;
  endfunction

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [15:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1; chipselect = 1;
    @(negedge clk);
    write = 0; chipselect = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk);
    address = a; read = 1; chipselect = 1;
    @(negedge clk);
    read = 0; chipselect = 0;
    d = readdata;
  endtask

  // high clocks on IN1 and IN2 over one whole PWM period
  task automatic measure(output int h1, output int h2);
    h1 = 0; h2 = 0;
    @(posedge clk iff pwm_period);
    for (int i = 0; i < int'(PWM_PERIOD); i++) begin
      @(posedge clk);
      h1 += in1; h2 += in2;
    end
  endtask

  // rates: ADC 100 kHz, PWM 25 kHz, speed window 100 Hz
  always @(posedge clk) if (rst_n) begin
    if (adc_valid) begin
      if (last_adc >= 0) check(cycle - last_adc == 500, $sformatf("ADC period %0d", cycle - last_adc));
      last_adc = cycle;
      n_adc++;
    end
    if (pwm_period) begin
      if (last_pwm >= 0) check(cycle - last_pwm == 2000, $sformatf("PWM period %0d", cycle - last_pwm));
      last_pwm = cycle;
    end
    if (speed_valid) begin
      if (last_speed >= 0)
        check(cycle - last_speed == 500_000, $sformatf("speed window %0d", cycle - last_speed));
      last_speed = cycle;
    end
  end

  // PWM drive for duty d in direction dr, checked over one full period
  task automatic expect_pwm(input int d, input bit dr, input string what);
    int h1, h2;
    measure(h1, h2);   // period in which a new command is picked up
    measure(h1, h2);
    check(ena && h1 == (dr ? 0 : d) && h2 == (dr ? d : 0),
          $sformatf("%s: duty %0d dir %0d gave IN1 %0d IN2 %0d", what, d, dr, h1, h2));
  endtask

  initial begin
    int h1, h2;
    logic [11:0] v;
    for (int i = 0; i < 8; i++) vin[i] = 12'($urandom);
    vin[0] = 12'd3850;   // 3.85 V at 1 mV per count
    repeat (3) @(posedge clk);
    rst_n = 1;
    adc.timing_violations = 0;   // ignore edges from power-up values before reset

    // ADC on channel 0: displays and bus
    repeat (3) @(posedge clk iff adc_valid);
    for (int k = 0; k < 3; k++) begin
      v = vin[0];
      @(posedge clk iff adc_valid);
      check(adc.conv_ch == 3'd0, "ADC converted a channel other than 0");
      repeat (3) @(negedge clk);
      check(hex0 == segs(lit[v[3:0]]) && hex1 == segs(lit[v[7:4]]) && hex2 == segs(lit[v[11:8]]),
            $sformatf("displays do not show %h", v));
      bus_read(REG_ADC, rd);
      check(rd == 16'(v), $sformatf("ADC register %h, expected %h", rd, v));
      n_display++;
      vin[0] = 12'($urandom);
      for (int i = 1; i < 8; i++) vin[i] = 12'($urandom);
    end

    // motor off: bridge idle, display "OFF"
    bus_write(REG_DUTY, 16'd500);
    measure(h1, h2);
    check(!ena && h1 == 0 && h2 == 0, "bridge driven while off");
    check(hex5 == segs("abcdef") && hex4 == segs("aefg") && hex3 == segs("aefg"), "OFF not shown");
    n_off++;

    // motor on, manual mode
    sw_on = 1;
    repeat (4) @(negedge clk);
    check(hex4 == segs("ceg") && hex3 == segs(""), "On not shown");
    expect_pwm(500, 0, "manual forward");
    n_manual++;
    sw_dir = 1;
    expect_pwm(500, 1, "manual reverse");
    n_manual++;
    bus_read(REG_CTRL, rd);
    check(rd[3:0] == 4'b0110, $sformatf("CTRL status %b", rd[3:0]));

    // automatic mode: software sets direction and duty
    sw_auto = 1;
    bus_write(REG_CTRL, 16'h0000);
    bus_write(REG_DUTY, 16'd1234);
    expect_pwm(1234, 0, "automatic forward");
    n_auto++;
    bus_write(REG_CTRL, 16'h0001);
    sw_dir = 0;   // switch ignored in automatic mode
    expect_pwm(1234, 1, "automatic reverse");
    n_auto++;

    // over-range duty is full on
    bus_write(REG_DUTY, 16'd2047);
    expect_pwm(2000, 1, "clamped duty");
    n_clamp++;
    bus_write(REG_DUTY, 16'd0);
    expect_pwm(0, 1, "zero duty");

    // encoder: 7 pulses (top speed), 1 pulse (minimum speed), 0 (stopped)
    @(posedge clk iff speed_valid);
    for (int w = 0; w < 3; w++) begin
      automatic int n = (w == 0) ? 7 : (w == 1) ? 1 : 0;
      repeat (1000) @(negedge clk);
      for (int p = 0; p < n; p++) begin
        enc = 1; repeat (30_000) @(negedge clk);
        enc = 0; repeat (30_000) @(negedge clk);
      end
      @(posedge clk iff speed_valid);
      bus_read(REG_SPEED, rd);
      check(rd == 16'(n), $sformatf("speed register %0d, sent %0d pulses", rd, n));
      n_speed++;
    end

    // switching off stops the bridge
    sw_on = 0;
    repeat (4) @(negedge clk);
    check(!ena && !in1 && !in2, "bridge still on after switch-off");
    n_off++;

    check(adc.timing_violations == 0, "ADC timing violations");
    $display("mechanisms: adc_samples=%0d display=%0d motor_off=%0d manual_dir=%0d auto_dir=%0d duty_clamp=%0d speed_windows=%0d",
             n_adc, n_display, n_off, n_manual, n_auto, n_clamp, n_speed);
    check(n_adc > 0, "no ADC sample");
    check(n_display > 0, "display never checked");
    check(n_off > 0, "motor never off");
    check(n_manual > 0, "manual direction never used");
    check(n_auto > 0, "automatic direction never used");
    check(n_clamp > 0, "duty clamp never used");
    check(n_speed > 0, "no speed window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
