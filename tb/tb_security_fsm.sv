// tb_security_fsm: walks the alarm controller through every arc of its
// state diagram with a hand-driven tick, checks the outputs in each state,
// the exact number of ticks the delay takes, the asynchronous clear by
// arm, and (in a second instance) the fire-sensor variant.
module tb_security_fsm;
  import security_pkg::*;

  logic clk = 1'b0;
  logic tick = 1'b0, arm = 1'b0, front = 1'b0, rear = 1'b0, win = 1'b0;
  logic run_timer, siren, sprinkler;
  sec_state_t state;
  logic f_run, f_siren, f_sprinkler;
  sec_state_t f_state;
  int checks = 0, failures = 0;

  security_fsm dut (.clk(clk), .tick(tick), .arm(arm), .front_door(front), .rear_door(rear),
                    .window(win), .run_timer(run_timer), .siren(siren),
                    .sprinkler(sprinkler), .state(state));

  security_fsm #(.FIRE_SENSOR(1'b1)) dut_fire (
    .clk(clk), .tick(tick), .arm(arm), .front_door(front), .rear_door(rear),
    .window(win), .run_timer(f_run), .siren(f_siren), .sprinkler(f_sprinkler),
    .state(f_state));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(sec_state_t s, string what);
    checks++;
    if (state !== s || run_timer !== (s == WAIT_DELAY) || siren !== (s == ALARM) ||
        sprinkler !== 1'b0) begin
      failures++;
      $display("FAIL %s: state=%s run=%b siren=%b, want %s", what, state.name(),
               run_timer, siren, s.name());
    end
  endtask

  // one clock, inputs changed at the falling edge
  task automatic clock(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // n ticks, each one clock wide, with `gap` idle clocks after each
  task automatic ticks(int n, int gap = 2);
    repeat (n) begin
      tick = 1'b1; clock();
      tick = 1'b0; clock(gap);
    end
  endtask

  initial begin
    clock(2);
    expect_state(DISARMED, "power-up with arm low");
    front = 1'b1; clock(3);
    expect_state(DISARMED, "sensor while disarmed");
    front = 1'b0;

    arm = 1'b1; clock();
    expect_state(ARMED, "arm");
    ticks(10);
    expect_state(ARMED, "armed, all closed, ticks running");

    // intrusion by each sensor, then the delay: 6 ticks stay, 7th alarms
    for (int s = 0; s < 3; s++) begin
      {front, rear, win} = 3'b100 >> s; clock();
      expect_state(WAIT_DELAY, "sensor opened");
      {front, rear, win} = 3'b000;
      ticks(6, 3);
      expect_state(WAIT_DELAY, "six ticks");
      tick = 1'b1; clock(); tick = 1'b0;
      expect_state(WAIT_DELAY, "seventh tick taken");
      clock();
      expect_state(ALARM, "clock after seventh tick");
      ticks(20);
      expect_state(ALARM, "alarm holds while armed");
      // asynchronous clear: checked before any clock edge
      #1 arm = 1'b0;
      #1 expect_state(DISARMED, "arm low clears at once");
      clock();
      arm = 1'b1; clock();
      expect_state(ARMED, "re-armed");
    end

    // ticks that come on back-to-back clocks are each counted
    win = 1'b1; clock(); win = 1'b0;
    tick = 1'b1; clock(7); tick = 1'b0;
    expect_state(WAIT_DELAY, "seven back-to-back ticks");
    clock();
    expect_state(ALARM, "alarm after back-to-back ticks");
    arm = 1'b0; clock(); arm = 1'b1; clock();

    // disarm during the delay, then the timer restarts from zero
    rear = 1'b1; clock(); rear = 1'b0;
    ticks(5);
    arm = 1'b0; clock();
    expect_state(DISARMED, "disarmed during delay");
    arm = 1'b1; clock();
    front = 1'b1; clock(); front = 1'b0;
    ticks(6);
    expect_state(WAIT_DELAY, "timer restarted after disarm");
    ticks(1);
    expect_state(ALARM, "alarm after a full restarted delay");

    // fire variant: fire acts at once, in any state, and is no intrusion
    arm = 1'b0; clock(2);
    rear = 1'b1; #1;
    checks++;
    if (f_siren !== 1'b1 || f_sprinkler !== 1'b1) begin
      failures++; $display("FAIL fire while disarmed: siren=%b sprinkler=%b", f_siren, f_sprinkler);
    end
    arm = 1'b1; clock(3);
    checks++;
    if (f_state !== ARMED || f_run !== 1'b0 || f_siren !== 1'b1) begin
      failures++; $display("FAIL fire is no intrusion: state=%s", f_state.name());
    end
    rear = 1'b0; #1;
    checks++;
    if (f_siren !== 1'b0 || f_sprinkler !== 1'b0) begin
      failures++; $display("FAIL fire cleared: siren=%b sprinkler=%b", f_siren, f_sprinkler);
    end
    win = 1'b1; clock(); win = 1'b0;
    ticks(7);
    checks++;
    if (f_state !== ALARM || f_siren !== 1'b1 || f_sprinkler !== 1'b0) begin
      failures++; $display("FAIL fire variant intrusion: state=%s", f_state.name());
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
