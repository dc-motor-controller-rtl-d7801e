// hex_display: board read-out of the motor controller on six digits.
//
// The three right-hand digits (HEX2..HEX0) show the latest 12-bit ADC sample
// in hexadecimal; with the ADC's 4.096 V unipolar range one count is 1 mV.
// The three left-hand digits (HEX5..HEX3) spell "On " while the motor output
// is enabled and "OFF" while it is not. That the display shows the ADC value
// and the on/off state follows the design description; which digits show what
// and the spelling are this design's choice. The sample is held in a register
// that loads on adc_valid, so the display does not flicker between samples.
// Segments are active-low {g,f,e,d,c,b,a}; the outputs are registered. A
// strobed sample appears two clocks after the strobe, a change of motor_on
// one clock after it.
module hex_display
  import motor_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADC_BITS-1:0] adc_data,   // sample from the ADC reader
  input  logic                adc_valid,  // one-clock strobe, adc_data is new
  input  logic                motor_on,   // ENA state
  output logic [6:0]          hex0,
  output logic [6:0]          hex1,
  output logic [6:0]          hex2,
  output logic [6:0]          hex3,
  output logic [6:0]          hex4,
  output logic [6:0]          hex5
);

  // Active-high letter patterns {g,f,e,d,c,b,a}.
  localparam logic [6:0] SEG_O     = 7'b0111111;
  localparam logic [6:0] SEG_N     = 7'b1010100;
  localparam logic [6:0] SEG_F     = 7'b1110001;
  localparam logic [6:0] SEG_BLANK = 7'b0000000;

  logic [ADC_BITS-1:0] shown;
  logic [6:0]          d0_n, d1_n, d2_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         shown <= '0;
    else if (adc_valid) shown <= adc_data;
  end

  hex7seg u_d0 (.digit(shown[3:0]),  .seg_n(d0_n));
  hex7seg u_d1 (.digit(shown[7:4]),  .seg_n(d1_n));
  hex7seg u_d2 (.digit(shown[11:8]), .seg_n(d2_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {hex5, hex4, hex3} <= {~SEG_BLANK, ~SEG_BLANK, ~SEG_BLANK};
      {hex2, hex1, hex0} <= {~SEG_BLANK, ~SEG_BLANK, ~SEG_BLANK};
    end else begin
      hex0 <= d0_n;
      hex1 <= d1_n;
      hex2 <= d2_n;
      hex5 <= ~SEG_O;
      hex4 <= motor_on ? ~SEG_N     : ~SEG_F;
      hex3 <= motor_on ? ~SEG_BLANK : ~SEG_F;
    end
  end

endmodule
