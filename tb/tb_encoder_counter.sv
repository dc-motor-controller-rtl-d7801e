// tb_encoder_counter: self-checking test of the encoder pulse counter.
//
// Runs at a reduced sampling divider and window. After each published count
// the test sends a random number of clean pulses (each held high and low for
// three sampling periods) that all fall inside the next window, then checks
// that window's published count, the spacing of the publication strobes
// (SAMPLE_DIV * WINDOW_TICKS clocks) and, on a second counter only three bits
// wide, that the count saturates at 7 instead of wrapping.
module tb_encoder_counter;

  localparam int DIV = 5, WIN = 60, NWIN = 30;

  logic clk = 0, rst_n = 0, enc = 0;
  logic [15:0] count;
  logic [2:0]  count3;
  logic        valid, valid3;
  int checks = 0, failures = 0, cycle = 0, last = -1, pulses, saturated = 0;

  always #10 clk = ~clk;
  always @(posedge clk) cycle++;

  encoder_counter #(.SAMPLE_DIV(DIV), .WINDOW_TICKS(WIN), .COUNT_W(16)) dut (
    .clk, .rst_n, .enc_in(enc), .count, .count_valid(valid));
  encoder_counter #(.SAMPLE_DIV(DIV), .WINDOW_TICKS(WIN), .COUNT_W(3)) dut3 (
    .clk, .rst_n, .enc_in(enc), .count(count3), .count_valid(valid3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk iff valid);   // first (empty) window
    check(count == 0, "first window not empty");
    last = cycle;
    for (int w = 0; w < NWIN; w++) begin
      pulses = (w % 5 == 4) ? 9 : int'($urandom_range(0, 8));
      fork
        begin
          repeat (2 * DIV) @(posedge clk);
          for (int p = 0; p < pulses; p++) begin
            enc = 1; repeat (3 * DIV) @(posedge clk);
            enc = 0; repeat (3 * DIV) @(posedge clk);
          end
        end
      join_none
      @(posedge clk iff valid);
      check(count == 16'(pulses), $sformatf("window %0d: count %0d, sent %0d", w, count, pulses));
      check(valid3 && count3 == 3'(pulses > 7 ? 7 : pulses),
            $sformatf("3-bit count %0d for %0d pulses", count3, pulses));
      if (pulses > 7) saturated++;
      check(cycle - last == DIV * WIN, $sformatf("window length %0d clocks", cycle - last));
      last = cycle;
      @(posedge clk);
      check(!valid, "strobe longer than one clock");
    end
    check(saturated > 0, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (DIV * WIN * (NWIN + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
