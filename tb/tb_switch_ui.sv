// tb_switch_ui: self-checking test of the switch interface.
//
// Moves the switches and the software direction at random. A two-clock delay
// line in the test predicts the synchronised switches; the test checks every
// clock that motor_on and auto_mode follow their switches two clocks late and
// that the applied direction is the software's in automatic mode and the
// direction switch's (also two clocks late) in manual mode.
module tb_switch_ui;

  logic clk = 0, rst_n = 0;
  logic sw_on = 0, sw_auto = 0, sw_dir = 0, sw_dir_cmd = 0;
  logic motor_on, auto_mode, dir;
  logic [2:0] d1 = '0, d2 = '0;
  int checks = 0, failures = 0, auto_cnt = 0, man_cnt = 0;

  always #10 clk = ~clk;

  switch_ui dut (.clk, .rst_n, .sw_on, .sw_auto, .sw_dir, .sw_dir_cmd,
                 .motor_on, .auto_mode, .dir);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      d2 = d1;
      d1 = {sw_on, sw_auto, sw_dir};
      @(negedge clk);
      check(motor_on == d2[2], "motor_on");
      check(auto_mode == d2[1], "auto_mode");
      check(dir == (d2[1] ? sw_dir_cmd : d2[0]), "dir");
      if (d2[1]) auto_cnt++; else man_cnt++;
      if ($urandom_range(0, 3) == 0) sw_on = ~sw_on;
      if ($urandom_range(0, 3) == 0) sw_auto = ~sw_auto;
      if ($urandom_range(0, 2) == 0) sw_dir = ~sw_dir;
      if ($urandom_range(0, 2) == 0) sw_dir_cmd = ~sw_dir_cmd;
    end
    check(auto_cnt > 0 && man_cnt > 0, "both modes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
