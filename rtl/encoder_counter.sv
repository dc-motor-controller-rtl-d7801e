// encoder_counter: speed feedback from the gear motor's pulse encoder.
//
// The encoder gives 7 pulses per shaft turn. The pulse line is sampled once
// per SAMPLE_DIV clocks (100 kHz at a 50 MHz clock), every low-to-high change
// between two samples counts one pulse, and every WINDOW_TICKS samples
// (10 ms) the count is published on `count` and the counter restarts from
// zero. Publishing at a fixed rate, instead of waiting for a fixed number of
// pulses, gives the speed controller regular updates even when the motor is
// slow or stopped; at 1000 rpm at least one pulse falls in each window.
// The sampling rate, the window and the count-and-reset scheme follow the
// design description. The two-flop synchroniser, the rising-edge criterion
// and saturation of the count at its maximum are this design's choices.
//
// Timing: `count` and a one-clock `count_valid` strobe change together at the
// end of each window. A pulse is seen if it stays high for at least one
// sampling period (10 us at the defaults).
module encoder_counter #(
  parameter int unsigned SAMPLE_DIV   = 500,   // clocks per sample (50 MHz / 100 kHz)
  parameter int unsigned WINDOW_TICKS = 1000,  // samples per window (10 ms)
  parameter int unsigned COUNT_W      = 16     // width of the published count
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enc_in,       // encoder pulse line (asynchronous)
  output logic [COUNT_W-1:0] count,        // pulses in the last complete window
  output logic               count_valid   // one-clock strobe when count is updated
);

  localparam int unsigned DIV_W = (SAMPLE_DIV   > 1) ? $clog2(SAMPLE_DIV)   : 1;
  localparam int unsigned WIN_W = (WINDOW_TICKS > 1) ? $clog2(WINDOW_TICKS) : 1;

  logic [1:0]         sync;
  logic               prev;
  logic [DIV_W-1:0]   div_cnt;
  logic [WIN_W-1:0]   tick_cnt;
  logic               tick, window_end, pulse;
  logic [COUNT_W-1:0] acc, acc_next;

  // Two-flop synchroniser for the asynchronous encoder line.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], enc_in};
  end

  // 100 kHz sampling tick.
  assign tick = (div_cnt == DIV_W'(SAMPLE_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= tick ? '0 : div_cnt + 1'b1;
  end

  assign window_end = tick && (tick_cnt == WIN_W'(WINDOW_TICKS - 1));
  assign pulse      = tick && sync[1] && !prev;
  assign acc_next   = (pulse && acc != '1) ? acc + 1'b1 : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev        <= 1'b0;
      tick_cnt    <= '0;
      acc         <= '0;
      count       <= '0;
      count_valid <= 1'b0;
    end else begin
      count_valid <= window_end;
      if (tick) begin
        prev     <= sync[1];
        tick_cnt <= window_end ? '0 : tick_cnt + 1'b1;
      end
      if (window_end) begin
        count <= acc_next;  // include a pulse seen on the last sample
        acc   <= '0;
      end else begin
        acc   <= acc_next;
      end
    end
  end

endmodule
