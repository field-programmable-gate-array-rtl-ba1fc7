// tb_security: the security system with a short divider (DIV_BITS = 4,
// a tick every 16 clocks) and a fast digit scan (SCAN_BITS = 2), under
// random switch activity. A cycle-level model written from the system's
// rules (state diagram, 7-tick delay, display of elapsed ticks, digit scan)
// runs beside it; siren, display, digit select and indicators are compared
// on every clock.
module tb_security;
  import security_pkg::*;

  localparam int DIV  = 16;
  localparam int SCAN = 4;

  logic clk = 1'b0;
  logic arm = 1'b0, front = 1'b0, rear = 1'b0, win = 1'b0;
  logic siren, sprinkler, arm_ind, front_ind, rear_ind, win_ind, cat;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  int alarms = 0, aborts = 0, intrusions = 0;

  security #(.DIV_BITS(4), .SCAN_BITS(2)) dut (
    .clk(clk), .arm(arm), .front_door(front), .rear_door(rear), .window(win),
    .siren(siren), .sprinkler(sprinkler), .arm_ind(arm_ind), .front_door_ind(front_ind),
    .rear_door_ind(rear_ind), .window_ind(win_ind), .leds(leds), .cat_control(cat));

  always #5 clk = ~clk;

  // ---- reference model ----
  localparam logic [7:0] SEG [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66,
                                      8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};
  int cycle = 0;           // clock edges since power-up
  int m_timer = 0, m_secs = 0;
  sec_state_t m_state = DISARMED;

  always @(posedge clk) begin
    automatic bit tick = (cycle % DIV) == DIV - 1;
    // arm low clears the state register without waiting for the clock
    automatic sec_state_t cur = arm ? m_state : DISARMED;
    automatic sec_state_t nxt = cur;
    case (cur)
      DISARMED:   if (arm) nxt = ARMED;
      ARMED:      if (front | rear | win) nxt = WAIT_DELAY;
      WAIT_DELAY: if (m_timer == 7) nxt = ALARM;
      ALARM:      ;
    endcase
    if (!arm) nxt = DISARMED;
    if (m_state == WAIT_DELAY && nxt == ALARM) alarms++;
    if (m_state == WAIT_DELAY && nxt == DISARMED) aborts++;
    if (m_state == ARMED && nxt == WAIT_DELAY) intrusions++;
    m_timer <= (cur != WAIT_DELAY) ? 0 : (tick && m_timer < 7) ? m_timer + 1 : m_timer;
    m_secs  <= (cur != WAIT_DELAY) ? 0 : tick ? (m_secs + 1) % 16 : m_secs;
    m_state <= nxt;
    cycle   <= cycle + 1;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int step = 0; step < 60000; step++) begin
      @(negedge clk);
      begin
        automatic bit m_cat = ((cycle / SCAN) % 2) == 1;
        automatic logic [7:0] m_leds = m_cat ? SEG[m_secs / 10] : SEG[m_secs % 10];
        checks++;
        if (siren !== (m_state == ALARM) || cat !== m_cat || leds !== m_leds ||
            sprinkler !== 1'b0 ||
            {arm_ind, front_ind, rear_ind, win_ind} !== {arm, front, rear, win}) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: state %s siren=%b cat=%b leds=%h, model siren=%b cat=%b leds=%h",
                     cycle, m_state.name(), siren, cat, leds, m_state == ALARM, m_cat, m_leds);
        end
      end
      // switch activity: arm mostly on, sensors opened briefly now and then
      if ($urandom % 500 == 0) arm = ~arm;
      else if (!arm && $urandom % 40 == 0) arm = 1'b1;
      front = ($urandom % 300 == 0);
      rear  = ($urandom % 300 == 0);
      win   = ($urandom % 300 == 0);
    end
    // every path through the state diagram must have been taken
    checks++;
    if (alarms == 0 || aborts == 0 || intrusions == 0) begin
      failures++;
      $display("FAIL coverage: intrusions=%0d alarms=%0d aborts=%0d", intrusions, alarms, aborts);
    end
    $display("intrusions=%0d alarms=%0d aborts=%0d", intrusions, alarms, aborts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
