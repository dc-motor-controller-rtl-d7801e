// motor_pkg: constants and types shared by the DC motor controller fabric.
//
// The board clock is 50 MHz. The PWM period of 2000 clocks (25 kHz switching)
// and the 11-bit duty command, the 16-bit bus words, the 12-bit ADC samples,
// the 100 kHz sampling rate and the 10 ms encoder window all come from the
// design description. The register map of the bus peripheral is this
// design's own choice.
package motor_pkg;

  localparam int unsigned CLK_HZ      = 50_000_000;  // board clock
  localparam int unsigned SAMPLE_HZ   = 100_000;     // ADC and encoder sampling rate
  localparam int unsigned PWM_PERIOD  = 2000;        // clocks per PWM period (25 kHz)
  localparam int unsigned DUTY_W      = 11;          // duty command 0..2000
  localparam int unsigned BUS_W       = 16;          // Avalon data width
  localparam int unsigned ADC_BITS    = 12;          // LTC2308 resolution
  localparam int unsigned ENC_WINDOW_MS = 10;        // encoder count publication period

  // Clocks per sample and samples per encoder window at the defaults.
  localparam int unsigned SAMPLE_DIV  = CLK_HZ / SAMPLE_HZ;                 // 500
  localparam int unsigned WINDOW_TICKS = SAMPLE_HZ * ENC_WINDOW_MS / 1000;  // 1000

  // Word addresses of the Avalon-MM peripheral.
  typedef enum logic [1:0] {
    REG_DUTY  = 2'd0,  // R/W: duty cycle, 0..PWM_PERIOD clocks high per period
    REG_CTRL  = 2'd1,  // R/W bit 0: software direction; read: status bits
    REG_SPEED = 2'd2,  // R  : encoder pulses in the last 10 ms window
    REG_ADC   = 2'd3   // R  : latest 12-bit ADC sample
  } reg_addr_e;

endpackage
