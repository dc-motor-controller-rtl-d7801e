// tb_adc_ltc2308: self-checking test of the LTC2308 reader against the
// behavioural ADC model.
//
// Each frame the test draws new random input voltages and a new random
// channel. It checks that every sample equals the model's conversion result,
// that the model converted the channel requested one frame earlier with a
// single-ended, unipolar, awake configuration, that samples arrive exactly
// every FRAME clocks and at the expected delay after CONVST, that CONVST is
// high for CONVST_CYCLES clocks, and that no SCK timing rule was broken.
module tb_adc_ltc2308;

  localparam int FRAME = 500, CONVST_CYCLES = 2, CONV_CYCLES = 80, SCK_HALF = 2;
  localparam int LATENCY = CONV_CYCLES + 24 * SCK_HALF;       // convst rise to valid
  localparam int NFRAMES = 40;

  logic clk = 0, rst_n = 0;
  logic [2:0] channel = '0;
  logic convst, sck, sdi, sdo, valid;
  logic [11:0] data;
  logic [7:0][11:0] vin;

  int checks = 0, failures = 0, cycle = 0;
  int last_valid = -1, last_convst = -1, convst_len = 0;
  logic [2:0] ch_at_start[$];

  always #10 clk = ~clk;  // 50 MHz

  adc_ltc2308 #(.FRAME(FRAME), .CONVST_CYCLES(CONVST_CYCLES),
                .CONV_CYCLES(CONV_CYCLES), .SCK_HALF(SCK_HALF)) dut (
    .clk, .rst_n, .channel, .adc_convst(convst), .adc_sck(sck),
    .adc_sdi(sdi), .adc_sdo(sdo), .data, .valid);

  ltc2308_model adc (.convst, .sck, .sdi, .sdo, .vin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle++;

  // CONVST pulse width and channel history
  always @(posedge clk) begin
    if (!rst_n) convst_len = 0;
    else if (convst) convst_len++;
    else if (convst_len != 0) begin
      check(convst_len == CONVST_CYCLES, $sformatf("CONVST high %0d clocks", convst_len));
      convst_len = 0;
    end
  end

  always @(posedge convst) begin
    last_convst = cycle;
    ch_at_start.push_back(channel);
  end

  initial begin
    for (int i = 0; i < 8; i++) vin[i] = 12'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    adc.timing_violations = 0;   // ignore edges from power-up values before reset
    for (int f = 0; f < NFRAMES; f++) begin
      @(posedge clk iff valid);
      check(data == adc.result, $sformatf("data %h, ADC converted %h", data, adc.result));
      check(cycle - last_convst == LATENCY,
            $sformatf("latency %0d clocks", cycle - last_convst));
      if (last_valid >= 0)
        check(cycle - last_valid == FRAME, $sformatf("frame %0d clocks", cycle - last_valid));
      last_valid = cycle;
      if (ch_at_start.size() >= 2) begin
        // the conversion just read used the word sent during the previous frame
        check(adc.conv_ch == ch_at_start[ch_at_start.size() - 2],
              $sformatf("converted channel %0d", adc.conv_ch));
        check(adc.last_cfg[5] == 1'b1 && adc.last_cfg[1] == 1'b1 && adc.last_cfg[0] == 1'b0,
              $sformatf("configuration word %b", adc.last_cfg));
      end
      // new inputs for the following frames
      for (int i = 0; i < 8; i++) vin[i] = 12'($urandom);
      channel = 3'($urandom);
    end
    check(adc.timing_violations == 0, $sformatf("%0d SCK timing violations", adc.timing_violations));
    check(adc.conversions >= NFRAMES, "conversion count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (FRAME * (NFRAMES + 5)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
