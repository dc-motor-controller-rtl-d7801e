// tb_hex_display: self-checking test of the six-digit read-out.
//
// Drives random ADC samples with and without the valid strobe and toggles the
// motor state. Checks, two clocks after each change, that HEX2..HEX0 show the
// last strobed sample in hexadecimal (a sample without a strobe must not
// appear) and that HEX5..HEX3 spell "On " or "OFF". Expected patterns are
// built from lists of lit segment letters.
module tb_hex_display;

  logic clk = 0, rst_n = 0;
  logic [11:0] adc_data = '0;
  logic adc_valid = 0, motor_on = 0;
  logic [6:0] hex0, hex1, hex2, hex3, hex4, hex5;
  logic [11:0] shown = '0;
  int checks = 0, failures = 0, on_seen = 0, off_seen = 0;

  always #10 clk = ~clk;

  hex_display dut (.clk, .rst_n, .adc_data, .adc_valid, .motor_on,
                   .hex0, .hex1, .hex2, .hex3, .hex4, .hex5);

  function automatic logic [6:0] segs(input string lit);
    logic [6:0] v = '1;
    for (int i = 0; i < lit.len(); i++) v[3'(lit[i] - "a")] = 1'b0;
    return v;
  endfunction

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      adc_data  = 12'($urandom);
      adc_valid = ($urandom_range(0, 2) != 0);
      if ($urandom_range(0, 9) == 0) motor_on = ~motor_on;
      if (adc_valid) shown = adc_data;
      @(posedge clk);   // sample register loads
      @(negedge clk);
      adc_valid = 0;
      @(posedge clk);   // display registers load
      @(negedge clk);
      check(hex0 == segs(lit[shown[3:0]]) && hex1 == segs(lit[shown[7:4]]) &&
            hex2 == segs(lit[shown[11:8]]), $sformatf("value %h not shown", shown));
      if (motor_on) begin
        on_seen++;
        check(hex5 == segs("abcdef") && hex4 == segs("ceg") && hex3 == segs(""), "On");
      end else begin
        off_seen++;
        check(hex5 == segs("abcdef") && hex4 == segs("aefg") && hex3 == segs("aefg"), "OFF");
      end
    end
    check(on_seen > 0 && off_seen > 0, "both motor states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
