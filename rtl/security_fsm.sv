// security_fsm: alarm controller of the security system.
//
// A four-state machine clocked by `clk`:
//   DISARMED   --arm=1-------------------> ARMED
//   ARMED      --any sensor open----------> WAIT_DELAY
//   WAIT_DELAY --delay timer done---------> ALARM   (checked first)
//   WAIT_DELAY --arm=0--------------------> DISARMED
//   ALARM      --arm=0--------------------> DISARMED
// Besides these arcs, arm = 0 clears the state register to DISARMED
// asynchronously, which is also how the machine starts: the arm switch is
// its reset. The sensors are combined as {front_door, rear_door, window};
// any of them high counts as an intrusion.
//
// In WAIT_DELAY the 3-bit delay timer advances on each `tick` (the
// divided clock, one clock wide); when it reaches 7 the machine enters
// ALARM on the next clock. Outside WAIT_DELAY the timer is held at 0. As
// the first tick may come at any time after the sensor opens, the delay is
// 6 to 7 tick periods (4.0 to 4.7 s at 1.49 Hz).
// Outputs are decoded from the state (Moore): run_timer = WAIT_DELAY,
// siren = ALARM.
//
// FIRE_SENSOR = 1 builds the optional variant in which the rear_door
// input is a fire sensor: fire drives siren and sprinkler at once, in any
// state, and is no longer treated as an intrusion sensor. With the
// default FIRE_SENSOR = 0, sprinkler is 0.
//
// arm is used both as the asynchronous clear of the state register and
// as a synchronous input of the next-state logic; that double use is the
// lab's and is deliberate. The timer's power-up value comes from its
// declaration, as an FPGA configuration loads it.
//
// The states, transitions, outputs and the 3-bit timer follow the lab;
// counting the timer with `tick` as a clock enable (rather than clocking
// it from the divided clock) and the reading of the fire variant are this
// design's choices.
module security_fsm
  import security_pkg::*;
#(
  parameter int unsigned TIMER_BITS  = 3,
  parameter bit          FIRE_SENSOR = 1'b0
) (
  input  logic       clk,
  input  logic       tick,
  input  logic       arm,
  input  logic       front_door,
  input  logic       rear_door,
  input  logic       window,
  output logic       run_timer,
  output logic       siren,
  output logic       sprinkler,
  output sec_state_t state
);

  sec_state_t            next_state;
  logic [TIMER_BITS-1:0] timer = '0;
  logic                  start_count;
  logic                  count_done;
  logic                  intrusion;
  logic                  fire;

  if (FIRE_SENSOR) begin : g_fire
    assign fire      = rear_door;
    assign intrusion = front_door | window;
  end else begin : g_no_fire
    assign fire      = 1'b0;
    assign intrusion = |{front_door, rear_door, window};
  end

  // State register: arm low is an asynchronous return to DISARMED.
  always_ff @(posedge clk or negedge arm) begin
    if (!arm) state <= DISARMED;
    else      state <= next_state;
  end

  always_comb begin
    next_state  = state;
    start_count = 1'b0;
    unique case (state)
      DISARMED:   if (arm) next_state = ARMED;
      ARMED:      if (!arm) next_state = DISARMED;
                  else if (intrusion) next_state = WAIT_DELAY;
      WAIT_DELAY: begin
        start_count = 1'b1;
        if (count_done) next_state = ALARM;
        else if (!arm)  next_state = DISARMED;
      end
      ALARM:      if (!arm) next_state = DISARMED;
    endcase
  end

  // Delay timer: counts ticks in WAIT_DELAY, cleared in every other state.
  always_ff @(posedge clk) begin
    if (state != WAIT_DELAY)
      timer <= '0;
    else if (start_count && tick && !count_done)
      timer <= timer + 1'b1;
  end

  assign count_done = &timer;

  assign run_timer = (state == WAIT_DELAY);
  assign siren     = (state == ALARM) || fire;
  assign sprinkler = fire;

  // The timer is back at 0 one clock after any cycle outside the delay.
  a_timer_idle : assert property (@(posedge clk) disable iff (!arm)
                                  (state != WAIT_DELAY) |=> (timer == '0));

endmodule
