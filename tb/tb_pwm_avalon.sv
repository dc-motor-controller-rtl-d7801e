// tb_pwm_avalon: self-checking test of the "pwm" bus peripheral.
//
// Runs with a 20-clock PWM period and a 200-clock encoder window. Through
// Avalon-MM reads and writes (read latency one clock) it checks: duty and
// direction registers read back what was written, a write without
// chipselect is ignored, writes to read-only registers change nothing, the
// status bits of CTRL follow the switch inputs, the ADC register holds the
// last strobed sample, and the SPEED register reports the pulses sent in the
// previous window. It also measures the PWM on-time on IN1 and IN2 for
// several duties and both directions, and that the bridge is off while the
// motor is switched off.
module tb_pwm_avalon;

  import motor_pkg::*;

  localparam int P = 20, DIV = 5, WIN = 40;

  logic clk = 0, rst_n = 0;
  logic [1:0] address = '0;
  logic chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = '0, readdata;
  logic enc = 0, adc_valid = 0, motor_on = 0, auto_mode = 0, dir = 0;
  logic [11:0] adc_data = '0;
  logic dir_cmd, ena, in1, in2, speed_valid, pwm_period;
  logic [15:0] speed;
  logic [15:0] rd;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  pwm_avalon #(.PERIOD(P), .ENC_DIV(DIV), .ENC_WINDOW(WIN)) dut (
    .clk, .rst_n, .avs_address(address), .avs_chipselect(chipselect),
    .avs_read(read), .avs_write(write), .avs_writedata(writedata),
    .avs_readdata(readdata), .enc_in(enc), .adc_data, .adc_valid,
    .motor_on, .auto_mode, .dir, .dir_cmd, .ena, .in1, .in2, .speed,
    .speed_valid, .pwm_period);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [15:0] d, input bit cs = 1);
    @(negedge clk);
    address = a; writedata = d; write = 1; chipselect = cs;
    @(negedge clk);
    write = 0; chipselect = 0;
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk);
    address = a; read = 1; chipselect = 1;
    @(negedge clk);
    read = 0; chipselect = 0;
    d = readdata;   // one clock of latency
  endtask

  // high clocks on IN1 and IN2 over one whole PWM period
  task automatic measure(output int h1, output int h2);
    h1 = 0; h2 = 0;
    @(posedge clk iff pwm_period);
    for (int i = 0; i < P; i++) begin
      @(posedge clk);
      h1 += in1; h2 += in2;
    end
  endtask

  initial begin
    int h1, h2, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    motor_on = 1;

    // duty and direction registers
    bus_write(REG_DUTY, 16'd7);
    bus_read(REG_DUTY, rd);
    check(rd == 16'd7, $sformatf("duty read %0d", rd));
    bus_write(REG_DUTY, 16'd9, 0);   // no chipselect
    bus_read(REG_DUTY, rd);
    check(rd == 16'd7, "write without chipselect took effect");
    bus_write(REG_CTRL, 16'h0001);
    check(dir_cmd == 1'b1, "dir_cmd not set");
    auto_mode = 1; dir = 1;
    repeat (2) @(negedge clk);
    bus_read(REG_CTRL, rd);
    check(rd[3:0] == 4'b1111, $sformatf("CTRL status %b", rd[3:0]));
    auto_mode = 0; dir = 0; motor_on = 0;
    bus_read(REG_CTRL, rd);
    check(rd[3:0] == 4'b0001, $sformatf("CTRL status %b", rd[3:0]));
    bus_write(REG_CTRL, 16'h0000);
    check(dir_cmd == 1'b0, "dir_cmd not cleared");

    // PWM on the bridge
    measure(h1, h2);
    check(h1 == 0 && h2 == 0 && ena == 0, "bridge driven while off");
    motor_on = 1;
    for (int k = 0; k < 6; k++) begin
      int d = (k == 5) ? 31 : int'($urandom_range(0, P));
      dir = k[0];
      bus_write(REG_DUTY, 16'(d));
      measure(h1, h2);   // period in which the command is picked up
      measure(h1, h2);
      if (d > P) d = P;
      check(ena == 1, "ENA low");
      check(h1 == (dir ? 0 : d) && h2 == (dir ? d : 0),
            $sformatf("duty %0d dir %0d: IN1 %0d IN2 %0d", d, dir, h1, h2));
    end

    // ADC register
    @(negedge clk); adc_data = 12'hA5C; adc_valid = 1;
    @(negedge clk); adc_valid = 0; adc_data = 12'h123;
    bus_read(REG_ADC, rd);
    check(rd == 16'h0A5C, $sformatf("ADC read %h", rd));
    bus_write(REG_ADC, 16'h0FFF);
    bus_read(REG_ADC, rd);
    check(rd == 16'h0A5C, "write to ADC register took effect");

    // SPEED register
    for (int w = 0; w < 4; w++) begin
      n = w * 2 + 1;
      @(posedge clk iff speed_valid);
      repeat (DIV) @(negedge clk);
      for (int p = 0; p < n; p++) begin
        enc = 1; repeat (2 * DIV) @(negedge clk);
        enc = 0; repeat (2 * DIV) @(negedge clk);
      end
      @(posedge clk iff speed_valid);
      bus_read(REG_SPEED, rd);
      check(rd == 16'(n), $sformatf("speed read %0d, sent %0d", rd, n));
      check(speed == 16'(n), "speed output");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
