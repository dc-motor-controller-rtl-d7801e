// tb_workloads: the operating points of the motor drive, run through the
// whole fabric at its default sizes.
//
// 1. Encoder at the motor's top speed, 5700 rpm: a continuous train of
//    7 pulses per turn (one pulse every 75 188 clocks). Each 10 ms window must
//    read 6 or 7 in the SPEED register, and the sum over all windows must be
//    within one pulse of 6.65 per window.
// 2. Encoder at 1000 rpm, the lowest speed that must still be measured: each
//    window must read 1 or 2, never 0.
// 3. ADC input swept over 0..3.85 V (1 mV per count), including full scale:
//    the ADC register and the displays must show each value.
module tb_workloads;

  import motor_pkg::*;

  localparam int WINDOW = 500_000;   // clocks per 10 ms

  logic clk = 0, rst_n = 0;
  logic [1:0] address = '0;
  logic chipselect = 0, read = 0, write = 0;
  logic [15:0] writedata = '0, readdata, rd;
  logic enc = 0;
  logic convst, sck, sdi, sdo, ena, in1, in2, adc_valid, speed_valid, pwm_period;
  logic [15:0] speed;
  logic [6:0] hex0, hex1, hex2, hex3, hex4, hex5;
  logic [7:0][11:0] vin = '0;

  int checks = 0, failures = 0;
  int enc_half = 0;   // half period of the encoder train in clocks, 0 = stopped

  always #10 clk = ~clk;

  motor_ctrl_top dut (
    .clk, .rst_n,
    .avs_address(address), .avs_chipselect(chipselect), .avs_read(read),
    .avs_write(write), .avs_writedata(writedata), .avs_readdata(readdata),
    .sw_on(1'b1), .sw_auto(1'b0), .sw_dir(1'b0),
    .adc_convst(convst), .adc_sck(sck), .adc_sdi(sdi), .adc_sdo(sdo),
    .enc_in(enc), .motor_ena(ena), .motor_in1(in1), .motor_in2(in2),
    .hex0, .hex1, .hex2, .hex3, .hex4, .hex5,
    .adc_valid, .speed, .speed_valid, .pwm_period);

  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic bus_read(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk);
    address = a; read = 1; chipselect = 1;
    @(negedge clk);
    read = 0; chipselect = 0;
    d = readdata;
  endtask

  function automatic logic [6:0] segs(input string lit);
    logic [6:0] v = '1;
    for (int i = 0; i < lit.len(); i++) v[3'(lit[i] - "a")] = 1'b0;
    return v;
  endfunction

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  // encoder pulse train generator
  initial forever begin
    if (enc_half == 0) begin
      enc = 0;
      @(negedge clk);
    end else begin
      enc = 1; repeat (enc_half) @(negedge clk);
      enc = 0; repeat (enc_half) @(negedge clk);
    end
  end

  // run `n` windows at `rpm`, check each count is lo or hi and the sum
  task automatic run_speed(input int rpm, input int n, input int lo, input int hi);
    int sum = 0;
    real per_window = 7.0 * rpm / 60.0 * 0.01;
    enc_half = int'(50_000_000.0 * 60.0 / (7.0 * rpm) / 2.0);
    @(posedge clk iff speed_valid);   // let the train settle for one window
    for (int w = 0; w < n; w++) begin
      @(posedge clk iff speed_valid);
      bus_read(REG_SPEED, rd);
      check(rd >= 16'(lo) && rd <= 16'(hi), $sformatf("%0d rpm: window count %0d", rpm, rd));
      sum += int'(rd);
    end
    check(real'(sum) >= per_window * n - 1.0 && real'(sum) <= per_window * n + 1.0,
          $sformatf("%0d rpm: %0d pulses in %0d windows, expected %f", rpm, sum, n, per_window * n));
    $display("%0d rpm: %0d pulses in %0d windows (%.2f per window expected)", rpm, sum, n, per_window);
  endtask

  initial begin
    logic [11:0] sweep [6] = '{12'd0, 12'd1, 12'd1000, 12'd2500, 12'd3850, 12'd4095};
    repeat (3) @(posedge clk);
    rst_n = 1;
    adc.timing_violations = 0;

    // ADC sweep on channel 0
    foreach (sweep[k]) begin
      vin[0] = sweep[k];
      vin[1] = ~sweep[k];   // a neighbour channel that must not be read
      repeat (2) @(posedge clk iff adc_valid);
      repeat (3) @(negedge clk);
      bus_read(REG_ADC, rd);
      check(rd == 16'(sweep[k]), $sformatf("ADC %0d mV read as %0d", sweep[k], rd));
      check(hex0 == segs(lit[sweep[k][3:0]]) && hex1 == segs(lit[sweep[k][7:4]]) &&
            hex2 == segs(lit[sweep[k][11:8]]), $sformatf("display for %0d mV", sweep[k]));
    end

    run_speed(5700, 6, 6, 7);
    run_speed(1000, 6, 1, 2);
    check(adc.timing_violations == 0, "ADC timing violations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (WINDOW * 20) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
