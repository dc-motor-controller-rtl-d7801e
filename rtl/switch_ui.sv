// switch_ui: the board-switch user interface of the motor controller.
//
// Three slide switches set the motor output on or off (it drives the H-bridge
// enable, ENA), choose manual or automatic mode, and give the rotation
// direction used in manual mode. In automatic mode the direction comes from
// the controller software instead. The three functions follow the design
// description; the two-flop synchronisers, the active-high sense of each
// switch and "automatic when sw_auto = 1" are this design's choices.
// Outputs settle two clocks after a switch moves.
module switch_ui (
  input  logic clk,
  input  logic rst_n,
  input  logic sw_on,       // raw switch: 1 = motor output enabled
  input  logic sw_auto,     // raw switch: 1 = automatic mode
  input  logic sw_dir,      // raw switch: rotation direction in manual mode
  input  logic sw_dir_cmd,  // direction requested by the software (automatic mode)
  output logic motor_on,    // synchronised on/off
  output logic auto_mode,   // synchronised mode
  output logic dir          // direction to apply to the H-bridge
);

  logic [2:0] meta, sync;
  logic       manual_dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      sync <= '0;
    end else begin
      meta <= {sw_on, sw_auto, sw_dir};
      sync <= meta;
    end
  end

  assign {motor_on, auto_mode, manual_dir} = sync;
  assign dir = auto_mode ? sw_dir_cmd : manual_dir;

endmodule
