// motor_ctrl_top: FPGA fabric of a DC motor speed controller.
//
// The controller software (a cascaded current and speed PI control loop run
// by the processor) sees the motor through one Avalon-MM peripheral; this
// top holds everything else on the FPGA side:
//   * adc_ltc2308 reads the on-board LTC2308 ADC (channel 0) at 100 kHz; the
//     sample is shown on the seven-segment displays and readable on the bus.
//   * switch_ui turns the board switches into motor on/off, manual/automatic
//     mode and the manual rotation direction.
//   * pwm_avalon is the bus peripheral: duty and direction registers, the
//     25 kHz PWM generator that drives the L298N H-bridge (ENA, IN1, IN2) and
//     the encoder pulse counter that reports the pulses of each 10 ms window.
//   * hex_display shows the ADC sample and "On"/"OFF".
// The processor, its bus fabric, the ADC chip, the H-bridge and the motor are
// outside this module; their signals are ports. On the board the H-bridge
// inputs ENA, IN1 and IN2 are on GPIO_0 bits 0, 8 and 9 and the encoder on
// GPIO_0 bit 1.
//
// Clock: one 50 MHz clock; rst_n is an asynchronous active-low reset.
module motor_ctrl_top
  import motor_pkg::*;
#(
  parameter int unsigned ADC_FRAME    = SAMPLE_DIV,   // clocks per ADC sample
  parameter int unsigned PERIOD       = PWM_PERIOD,   // clocks per PWM period
  parameter int unsigned ENC_DIV      = SAMPLE_DIV,   // clocks per encoder sample
  parameter int unsigned ENC_WINDOW   = WINDOW_TICKS  // samples per speed window
) (
  input  logic             clk,
  input  logic             rst_n,
  // Avalon-MM slave, from the processor's bus bridge
  input  logic [1:0]       avs_address,
  input  logic             avs_chipselect,
  input  logic             avs_read,
  input  logic             avs_write,
  input  logic [BUS_W-1:0] avs_writedata,
  output logic [BUS_W-1:0] avs_readdata,
  // board switches
  input  logic             sw_on,
  input  logic             sw_auto,
  input  logic             sw_dir,
  // LTC2308 serial port
  output logic             adc_convst,
  output logic             adc_sck,
  output logic             adc_sdi,
  input  logic             adc_sdo,
  // encoder and H-bridge
  input  logic             enc_in,
  output logic             motor_ena,
  output logic             motor_in1,
  output logic             motor_in2,
  // seven-segment displays, active-low {g,f,e,d,c,b,a}
  output logic [6:0]       hex0,
  output logic [6:0]       hex1,
  output logic [6:0]       hex2,
  output logic [6:0]       hex3,
  output logic [6:0]       hex4,
  output logic [6:0]       hex5,
  // status, for monitoring
  output logic             adc_valid,    // new ADC sample
  output logic [BUS_W-1:0] speed,        // last encoder count
  output logic             speed_valid,  // new encoder count
  output logic             pwm_period    // last clock of a PWM period
);

  localparam logic [2:0] ADC_CHANNEL = 3'd0;  // input read by this design

  logic [ADC_BITS-1:0] adc_data;
  logic                motor_on, auto_mode, dir, dir_cmd;

  adc_ltc2308 #(
    .FRAME(ADC_FRAME)
  ) u_adc (
    .clk       (clk),
    .rst_n     (rst_n),
    .channel   (ADC_CHANNEL),
    .adc_convst(adc_convst),
    .adc_sck   (adc_sck),
    .adc_sdi   (adc_sdi),
    .adc_sdo   (adc_sdo),
    .data      (adc_data),
    .valid     (adc_valid)
  );

  switch_ui u_ui (
    .clk       (clk),
    .rst_n     (rst_n),
    .sw_on     (sw_on),
    .sw_auto   (sw_auto),
    .sw_dir    (sw_dir),
    .sw_dir_cmd(dir_cmd),
    .motor_on  (motor_on),
    .auto_mode (auto_mode),
    .dir       (dir)
  );

  pwm_avalon #(
    .PERIOD      (PERIOD),
    .ENC_DIV     (ENC_DIV),
    .ENC_WINDOW  (ENC_WINDOW)
  ) u_pwm (
    .clk           (clk),
    .rst_n         (rst_n),
    .avs_address   (avs_address),
    .avs_chipselect(avs_chipselect),
    .avs_read      (avs_read),
    .avs_write     (avs_write),
    .avs_writedata (avs_writedata),
    .avs_readdata  (avs_readdata),
    .enc_in        (enc_in),
    .adc_data      (adc_data),
    .adc_valid     (adc_valid),
    .motor_on      (motor_on),
    .auto_mode     (auto_mode),
    .dir           (dir),
    .dir_cmd       (dir_cmd),
    .ena           (motor_ena),
    .in1           (motor_in1),
    .in2           (motor_in2),
    .speed         (speed),
    .speed_valid   (speed_valid),
    .pwm_period    (pwm_period)
  );

  hex_display u_hex (
    .clk      (clk),
    .rst_n    (rst_n),
    .adc_data (adc_data),
    .adc_valid(adc_valid),
    .motor_on (motor_on),
    .hex0     (hex0),
    .hex1     (hex1),
    .hex2     (hex2),
    .hex3     (hex3),
    .hex4     (hex4),
    .hex5     (hex5)
  );

endmodule
