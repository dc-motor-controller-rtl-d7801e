// tb_hex7seg: exhaustive check of the seven-segment decoder.
//
// The expected pattern of every digit is written as the list of lit segment
// letters (a = top, then clockwise, g = middle), converted to the active-low
// {g,f,e,d,c,b,a} vector and compared with the decoder for all 16 inputs.
module tb_hex7seg;

  logic [3:0] digit;
  logic [6:0] seg_n;
  int checks = 0, failures = 0;

  hex7seg dut (.digit, .seg_n);

  function automatic logic [6:0] segs(input string lit);
    logic [6:0] v = '1;
    for (int i = 0; i < lit.len(); i++) v[3'(lit[i] - "a")] = 1'b0;
    return v;
  endfunction

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = 4'(d);
      #1;
      checks++;
      if (seg_n !== segs(lit[d])) begin
        failures++;
        $display("FAIL: digit %h gives %b, expected %b", d, seg_n, segs(lit[d]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
