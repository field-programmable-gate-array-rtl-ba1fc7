// security: top level of the security-alarm system for an FPGA demo board.
//
// Four switches come in: arm and three intrusion sensors (front door, rear
// door, window). The arm switch and the sensors are repeated on four
// indicator LEDs. When the system is armed and a sensor opens, a delay of
// seven timer ticks runs, shown in seconds on a two-digit 7-segment
// display; if the system is not disarmed in that time the siren turns on
// and stays on until it is.
//
// Structure (as in the lab's block diagram):
//   clk_div        board clock -> one-cycle tick (ce_sig), 1.49 Hz at 50 MHz
//   security_fsm   alarm state machine and delay timer -> run_sig, siren
//   addr_cntr_cat  tick counter and digit scan -> addr_bus, cat_control
//   mem5           addr_bus -> 7-segment pattern on leds
// The indicator LEDs are wired straight from the switches.
//
// Timing: everything runs on `clk`; leds and cat_control change with the
// scan divider; siren rises on the clock after the seventh tick seen in
// WAIT_DELAY (see security_fsm). There is no reset
// port: arm low resets the state machine, the counters power up at 0.
// FIRE_SENSOR = 1 selects the optional fire-sensor variant (rear_door
// becomes a fire input that also drives sprinkler).
module security #(
  parameter int unsigned DIV_BITS    = 25,
  parameter int unsigned SCAN_BITS   = 16,
  parameter bit          FIRE_SENSOR = 1'b0
) (
  input  logic       clk,
  input  logic       arm,
  input  logic       front_door,
  input  logic       rear_door,
  input  logic       window,
  output logic       siren,
  output logic       sprinkler,
  output logic       arm_ind,
  output logic       front_door_ind,
  output logic       rear_door_ind,
  output logic       window_ind,
  output logic [7:0] leds,
  output logic       cat_control
);

  logic       ce_sig;
  logic       run_sig;
  logic [4:0] addr_bus;

  // Indicator LEDs repeat the switches.
  assign arm_ind        = arm;
  assign front_door_ind = front_door;
  assign rear_door_ind  = rear_door;
  assign window_ind     = window;

  clk_div #(.DIV_BITS(DIV_BITS)) u_clk_div (
    .clk (clk),
    .ce  (ce_sig)
  );

  addr_cntr_cat #(.SCAN_BITS(SCAN_BITS)) u_addr_cntr_cat (
    .clk         (clk),
    .run_timer   (run_sig),
    .ce          (ce_sig),
    .addr        (addr_bus),
    .cat_control (cat_control)
  );

  mem5 u_mem5 (
    .addr    (addr_bus),
    .led_out (leds)
  );

  security_fsm #(.FIRE_SENSOR(FIRE_SENSOR)) u_fsm (
    .clk        (clk),
    .tick       (ce_sig),
    .arm        (arm),
    .front_door (front_door),
    .rear_door  (rear_door),
    .window     (window),
    .run_timer  (run_sig),
    .siren      (siren),
    .sprinkler  (sprinkler),
    .state      ()
  );

endmodule
