// pwm_avalon: the "pwm" bus peripheral that links the controller software to
// the motor hardware.
//
// The processor reaches it as an Avalon-MM slave with 16-bit data and four
// word registers (addresses from motor_pkg::reg_addr_e):
//   0 DUTY  R/W  bits 10:0, PWM on-time in clocks per 2000-clock period
//   1 CTRL  R/W  bit 0: direction requested by software (used in automatic
//                mode); read also returns bit 1: direction applied,
//                bit 2: motor on, bit 3: automatic mode
//   2 SPEED R    encoder pulses counted in the last 10 ms window
//   3 ADC   R    latest 12-bit ADC sample
// It embeds the encoder counter and the PWM generator, as the design
// describes: the software reads the pulse count and writes the duty cycle and
// the rotation direction through it, with 16-bit read and write data. The
// register addresses, the status bits and the ADC read-back register are this
// design's choices (the ADC sample is shown reaching the bus in the design's
// interface diagram).
//
// Timing: writes take effect on the clock edge where avs_write is high;
// reads have a fixed latency of one clock (readdata is registered). The duty
// and direction reach the bridge at the next PWM period boundary.
//
// The bus-rule assertion reads rst_n in its disable clause; lint reports
// that as a reset used both asynchronously and synchronously. The synchronous
// use is in checking code only, not in the circuit.
module pwm_avalon
  import motor_pkg::*;
#(
  parameter int unsigned PERIOD       = PWM_PERIOD,
  parameter int unsigned ENC_DIV      = SAMPLE_DIV,   // clocks per encoder sample
  parameter int unsigned ENC_WINDOW   = WINDOW_TICKS  // samples per speed window
) (
  input  logic                clk,
  input  logic                rst_n,
  // Avalon-MM slave
  input  logic [1:0]          avs_address,
  input  logic                avs_chipselect,
  input  logic                avs_read,
  input  logic                avs_write,
  input  logic [BUS_W-1:0]    avs_writedata,
  output logic [BUS_W-1:0]    avs_readdata,
  // board side
  input  logic                enc_in,      // encoder pulse line
  input  logic [ADC_BITS-1:0] adc_data,    // ADC sample
  input  logic                adc_valid,   // ADC sample strobe
  input  logic                motor_on,    // on/off switch (synchronised)
  input  logic                auto_mode,   // mode switch (synchronised)
  input  logic                dir,         // direction to apply
  output logic                dir_cmd,     // software direction request
  output logic                ena,         // to L298N ENA
  output logic                in1,         // to L298N IN1
  output logic                in2,         // to L298N IN2
  output logic [BUS_W-1:0]    speed,       // last encoder count
  output logic                speed_valid, // one-clock strobe: speed updated
  output logic                pwm_period   // last clock of each PWM period
);

  logic [DUTY_W-1:0]   duty;
  logic [ADC_BITS-1:0] adc_q;
  logic                wr, rd;

  assign wr = avs_chipselect && avs_write;
  assign rd = avs_chipselect && avs_read;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      duty    <= '0;
      dir_cmd <= 1'b0;
    end else if (wr) begin
      unique case (reg_addr_e'(avs_address))
        REG_DUTY: duty    <= avs_writedata[DUTY_W-1:0];
        REG_CTRL: dir_cmd <= avs_writedata[0];
        default:  ;  // read-only registers ignore writes
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         adc_q <= '0;
    else if (adc_valid) adc_q <= adc_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) avs_readdata <= '0;
    else if (rd) begin
      unique case (reg_addr_e'(avs_address))
        REG_DUTY:  avs_readdata <= BUS_W'(duty);
        REG_CTRL:  avs_readdata <= BUS_W'({auto_mode, motor_on, dir, dir_cmd});
        REG_SPEED: avs_readdata <= speed;
        REG_ADC:   avs_readdata <= BUS_W'(adc_q);
      endcase
    end
  end

  // Bus rule: a master never reads and writes in the same cycle.
  a_no_read_and_write: assert property (@(posedge clk) disable iff (!rst_n)
                                        avs_chipselect |-> !(avs_read && avs_write));

  encoder_counter #(
    .SAMPLE_DIV  (ENC_DIV),
    .WINDOW_TICKS(ENC_WINDOW),
    .COUNT_W     (BUS_W)
  ) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .enc_in     (enc_in),
    .count      (speed),
    .count_valid(speed_valid)
  );

  pwm_gen #(
    .PERIOD(PERIOD),
    .DUTY_W(DUTY_W)
  ) u_pwm (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (motor_on),
    .duty        (duty),
    .dir         (dir),
    .ena         (ena),
    .in1         (in1),
    .in2         (in2),
    .period_start(pwm_period)
  );

endmodule
