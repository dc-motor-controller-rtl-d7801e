// adc_ltc2308: reader for the LTC2308 8-channel 12-bit SAR ADC.
//
// Every FRAME clocks (500 clocks, 100 kHz at a 50 MHz clock) the reader
// raises CONVST for a short pulse, which starts a conversion, waits for the
// conversion to finish, then runs 12 SCK cycles. During the first six it
// sends the configuration word on SDI (S/D, O/S, S1, S0, UNI, SLP, first bit
// first) and on all twelve it collects the result from SDO, MSB first. The
// word sent in one frame configures the next conversion, so the sample read
// in a frame uses the channel chosen one frame earlier. The configuration is
// single-ended and unipolar, which with the ADC's 4.096 V range makes one
// count worth 1 mV.
//
// Following the design description: the short-CONVST mode, the 100 kHz rate,
// the 12-bit result and the channel input (channel 0 in this design). This
// design's choices: SCK is derived from the clock with a half period of
// SCK_HALF clocks (12.5 MHz by default, inside the ADC's 40 MHz limit), SDI
// changes one clock after a falling SCK edge so that it is stable at both
// edges, SDO is sampled on the clock edge that raises SCK (it changes after
// the falling edge), and the wait for the conversion is CONV_CYCLES clocks
// (1.6 us, the maximum conversion time of the part).
//
// Timing: adc_sck, adc_sdi and adc_convst are registered. `data` and the
// one-clock `valid` strobe update CONV_CYCLES + 24*SCK_HALF clocks after the
// rising edge of CONVST, once per frame.
//
// The assertions at the end read rst_n in their disable clause; lint reports
// that as a reset used both asynchronously and synchronously. The synchronous
// use is in checking code only, not in the circuit.
module adc_ltc2308 #(
  parameter int unsigned FRAME         = 500,  // clocks per conversion frame
  parameter int unsigned CONVST_CYCLES = 2,    // CONVST high time
  parameter int unsigned CONV_CYCLES   = 80,   // clocks from CONVST rise to first SCK
  parameter int unsigned SCK_HALF      = 2     // clocks per SCK half period, >= 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  channel,     // single-ended input to convert next (0..7)
  output logic        adc_convst,  // to LTC2308 CONVST
  output logic        adc_sck,     // to LTC2308 SCK
  output logic        adc_sdi,     // to LTC2308 SDI
  input  logic        adc_sdo,     // from LTC2308 SDO
  output logic [11:0] data,        // last sample
  output logic        valid        // one-clock strobe: data is new
);

  localparam int unsigned FW    = $clog2(FRAME);
  localparam int unsigned PH_W  = $clog2(2 * SCK_HALF);
  localparam int unsigned NBITS = 12;

  if (SCK_HALF < 2) begin : g_chk_half
    $error("adc_ltc2308: SCK_HALF must be at least 2");
  end
  if (CONV_CYCLES < CONVST_CYCLES + 1) begin : g_chk_conv
    $error("adc_ltc2308: CONV_CYCLES must exceed CONVST_CYCLES");
  end
  if (FRAME <= CONV_CYCLES + 2 * NBITS * SCK_HALF + 1) begin : g_chk_frame
    $error("adc_ltc2308: FRAME too short for conversion and read-out");
  end

  // Configuration word for single-ended channel ch, unipolar, no sleep.
  // Channel ch is selected by O/S = ch[0], S1 = ch[2], S0 = ch[1].
  function automatic logic [5:0] cfg_word(input logic [2:0] ch);
    return {1'b1, ch[0], ch[2], ch[1], 1'b1, 1'b0};
  endfunction

  typedef enum logic [0:0] {S_WAIT, S_SHIFT} state_e;

  state_e          state;
  logic [FW-1:0]   fc, fc_next;
  logic [PH_W-1:0] ph;
  logic [3:0]      bitn;
  logic [5:0]      cfg;
  logic [11:0]     shreg;

  assign fc_next = (fc == FW'(FRAME - 1)) ? '0 : fc + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fc         <= FW'(FRAME - 1);  // first frame starts right after reset
      state      <= S_WAIT;
      ph         <= '0;
      bitn       <= '0;
      cfg        <= '0;
      shreg      <= '0;
      adc_convst <= 1'b0;
      adc_sck    <= 1'b0;
      adc_sdi    <= 1'b0;
      data       <= '0;
      valid      <= 1'b0;
    end else begin
      fc         <= fc_next;
      adc_convst <= (32'(fc_next) < CONVST_CYCLES);
      valid      <= 1'b0;
      if (fc_next == '0)
        cfg <= cfg_word(channel);

      unique case (state)
        S_WAIT: begin
          adc_sck <= 1'b0;
          adc_sdi <= 1'b0;
          if (fc_next == FW'(CONV_CYCLES)) begin
            state <= S_SHIFT;
            ph    <= '0;
            bitn  <= '0;
          end
        end
        S_SHIFT: begin
          if (ph == PH_W'(2 * SCK_HALF - 1)) begin
            // last clock of an SCK period: SCK falls on this edge
            adc_sck <= 1'b0;
            ph      <= '0;
            if (bitn == 4'(NBITS - 1)) begin
              state <= S_WAIT;
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              bitn <= bitn + 1'b1;
            end
          end else begin
            ph <= ph + 1'b1;
            if (ph == PH_W'(SCK_HALF - 1)) begin
              // SCK rises on this edge; SDO has been stable since the fall
              adc_sck <= 1'b1;
              shreg   <= {shreg[10:0], adc_sdo};
            end
            if (ph == '0)
              adc_sdi <= (bitn < 4'd6) ? cfg[3'd5 - bitn[2:0]] : 1'b0;
          end
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // Serial-port rules: no SCK while CONVST is high, SDI steady across the
  // high phase of SCK and across its falling edge.
  a_no_sck_in_convst: assert property (@(posedge clk) disable iff (!rst_n) adc_convst |-> !adc_sck);
  a_sdi_stable:       assert property (@(posedge clk) disable iff (!rst_n)
                                       (adc_sck || $fell(adc_sck)) |-> $stable(adc_sdi));

endmodule
