// ltc2308_model: behavioural model of the LTC2308 ADC serial port, for
// simulation only.
//
// A rising CONVST edge converts one input: the channel is the one named by
// the configuration word received in the previous frame (channel 0 before the
// first word), and the 12-bit result is the value on `vin` for that channel
// at that moment. The MSB is on SDO at once; each falling SCK edge shifts the
// next bit out. The first six rising SCK edges of a frame clock in the
// configuration word (S/D, O/S, S1, S0, UNI, SLP); single-ended channel
// numbers decode as {S1, S0, O/S}. The model also counts timing violations:
// an SCK edge before the conversion time has passed, or an SCK phase shorter
// than the 12.5 ns of the part's 40 MHz SCK limit.
module ltc2308_model #(
  parameter realtime TCONV = 1600ns  // maximum conversion time
) (
  input  logic             convst,
  input  logic             sck,
  input  logic             sdi,
  output logic             sdo,
  input  logic [7:0][11:0] vin
);

  logic [11:0] result = '0;   // last conversion
  logic [11:0] shreg  = '0;
  logic [2:0]  conv_ch = '0;  // channel of the last conversion
  logic [2:0]  next_ch = '0;
  logic [5:0]  cfg_sr  = '0;
  logic [5:0]  last_cfg = '0; // last complete configuration word
  int          rises = 0;
  int          conversions = 0;
  int          timing_violations = 0;
  realtime     t_conv = 0;
  realtime     t_edge = 0;

  initial sdo = 1'b0;

  always @(posedge convst) begin
    if (rises >= 6) begin
      last_cfg = cfg_sr;
      next_ch  = {cfg_sr[3], cfg_sr[2], cfg_sr[4]};
    end
    conv_ch = next_ch;
    result  = vin[next_ch];
    shreg   = result;
    sdo     = shreg[11];
    rises   = 0;
    t_conv  = $realtime;
    conversions++;
  end

  always @(posedge sck) begin
    if ($realtime - t_conv < TCONV) timing_violations++;
    if ($realtime - t_edge < 12.5ns) timing_violations++;
    t_edge = $realtime;
    if (rises < 6) cfg_sr = {cfg_sr[4:0], sdi};
    rises++;
  end

  always @(negedge sck) begin
    if ($realtime - t_edge < 12.5ns) timing_violations++;
    t_edge = $realtime;
    shreg = {shreg[10:0], 1'b0};
    sdo   = shreg[11];
  end

endmodule
