// tb_lab_top: end-to-end test of both designs in the top, with the timer
// divider shortened to 16 clocks (DIV_BITS = 4) and the digit scan to 4
// clocks (SCAN_BITS = 2).
//
// ALU: the eight worked rows of its function table, then random operands
// for every control setting against an arithmetic model. Two's complement
// circuit: all 16 inputs.
// Security system: arm; trigger the delay with each sensor in turn and let
// it run out (siren must rise 6 to 7 tick periods after the sensor, while
// the display counts the elapsed ticks on the units digit and shows 0 on
// the tens digit); disarm from ALARM; disarm during the delay and check the
// delay restarts in full. Each mechanism is counted and must occur.
module tb_lab_top;
  localparam int DIV = 16;
  localparam logic [7:0] SEG [10] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66,
                                      8'h6D, 8'h7D, 8'h07, 8'h7F, 8'h6F};

  logic [3:0] alu_a, alu_b, alu_y;
  logic       alu_cin, alu_logic_n_arith, alu_invert, alu_n_a_only, alu_cout, alu_neg_cry;
  logic [3:0] tc_a, tc_y;
  logic       tc_cry;
  logic       clk = 1'b0;
  logic       arm = 1'b0, front = 1'b0, rear = 1'b0, win = 1'b0;
  logic       siren, arm_ind, front_ind, rear_ind, win_ind, cat;
  logic [7:0] leds;
  int checks = 0, failures = 0;

  // mechanism counters
  int alu_fn [8];
  int n_arm = 0, n_intrusion [3], n_alarm = 0, n_disarm_alarm = 0, n_abort = 0;
  int n_cat_toggle = 0;
  bit digit_seen [10];

  lab_top #(.DIV_BITS(4), .SCAN_BITS(2)) dut (
    .alu_a(alu_a), .alu_b(alu_b), .alu_cin(alu_cin), .alu_logic_n_arith(alu_logic_n_arith),
    .alu_invert(alu_invert), .alu_n_a_only(alu_n_a_only), .alu_y(alu_y), .alu_cout(alu_cout),
    .alu_neg_cry(alu_neg_cry), .tc_a(tc_a), .tc_y(tc_y), .tc_cry(tc_cry),
    .clk(clk), .arm(arm), .front_door(front), .rear_door(rear), .window(win), .siren(siren),
    .arm_ind(arm_ind), .front_door_ind(front_ind), .rear_door_ind(rear_ind),
    .window_ind(win_ind), .leds(leds), .cat_control(cat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- ALU ----------------
  function automatic logic [4:0] alu_model(logic [2:0] ctl, logic [3:0] a, logic [3:0] b,
                                           logic cin);
    logic [3:0] z;
    logic [4:0] s;
    z = !ctl[0] ? a : ctl[1] ? ~a : 4'(-a);
    s = 5'(z) + 5'(b) + 5'(cin);
    return {s[4], !ctl[2] ? z : ctl[1] ? (z & b) : s[3:0]};
  endfunction

  task automatic alu_run();
    // {n_a_only, logic_n_arith, invert}, a, b, result from the worked table
    logic [14:0] rows [8] = '{{3'b000, 4'hE, 4'hD, 4'hE}, {3'b001, 4'hC, 4'hE, 4'h4},
                              {3'b010, 4'hF, 4'h9, 4'hF}, {3'b011, 4'hF, 4'hC, 4'h0},
                              {3'b100, 4'h2, 4'h5, 4'h7}, {3'b101, 4'hF, 4'hA, 4'hB},
                              {3'b110, 4'hF, 4'h8, 4'h8}, {3'b111, 4'h2, 4'h5, 4'h5}};
    alu_cin = 1'b0;
    foreach (rows[r]) begin
      {alu_n_a_only, alu_logic_n_arith, alu_invert, alu_a, alu_b} = rows[r][14:4];
      #1;
      check(alu_y == rows[r][3:0], $sformatf("ALU table row %0d: y=%h", r, alu_y));
    end
    repeat (400) begin
      logic [4:0] m;
      {alu_n_a_only, alu_logic_n_arith, alu_invert} = 3'($urandom);
      alu_a = 4'($urandom); alu_b = 4'($urandom); alu_cin = 1'($urandom);
      #1;
      m = alu_model({alu_n_a_only, alu_logic_n_arith, alu_invert}, alu_a, alu_b, alu_cin);
      check({alu_cout, alu_y} == m, $sformatf("ALU %b%b%b a=%h b=%h: y=%h", alu_n_a_only,
            alu_logic_n_arith, alu_invert, alu_a, alu_b, alu_y));
      alu_fn[{alu_n_a_only, alu_logic_n_arith, alu_invert}]++;
    end
  endtask

  // ---------------- security system ----------------
  // display monitor: while the delay runs, units digit = elapsed ticks
  logic cat_q = 1'b0;
  always @(negedge clk) begin
    if (cat != cat_q) n_cat_toggle++;
    cat_q <= cat;
    for (int d = 0; d < 10; d++)
      if (!cat && leds == SEG[d]) digit_seen[d] = 1'b1;
    if (cat) begin
      checks++;
      if (leds != SEG[0]) begin failures++; $display("FAIL tens digit %h", leds); end
    end
    checks++;
    if ({arm_ind, front_ind, rear_ind, win_ind} != {arm, front, rear, win}) begin
      failures++; $display("FAIL indicators");
    end
  end

  task automatic clocks(int n);
    repeat (n) @(negedge clk);
  endtask

  // open one sensor briefly and wait for the siren; returns clocks taken
  task automatic intrude(int which, output int waited);
    {front, rear, win} = 3'b100 >> which;
    clocks(1);
    {front, rear, win} = 3'b000;
    waited = 1;
    while (!siren && waited < 20 * DIV) begin clocks(1); waited++; end
  endtask

  initial begin
    int waited;
    foreach (n_intrusion[i]) n_intrusion[i] = 0;
    foreach (alu_fn[i]) alu_fn[i] = 0;
    alu_run();
    for (int i = 0; i < 16; i++) begin
      tc_a = 4'(i);
      #1;
      check(tc_y == 4'((16 - i) % 16) && tc_cry == (i == 0),
            $sformatf("two's complement of %h: %h", tc_a, tc_y));
    end

    clocks(5);
    check(!siren, "siren off while disarmed");
    front = 1'b1; clocks(3 * DIV); front = 1'b0;
    check(!siren, "sensor ignored while disarmed");

    for (int s = 0; s < 3; s++) begin
      arm = 1'b1; n_arm++;
      clocks(2 * DIV + 3);
      check(!siren, "armed, quiet");
      intrude(s, waited);
      n_intrusion[s]++;
      check(siren && waited > 6 * DIV && waited <= 7 * DIV + 1,
            $sformatf("alarm after %0d clocks (sensor %0d)", waited, s));
      if (siren) n_alarm++;
      clocks(3 * DIV);
      check(siren, "siren holds");
      arm = 1'b0; #1;
      check(!siren, "disarm from alarm clears siren at once");
      n_disarm_alarm++;
      clocks(2);
    end

    // abort: disarm halfway through the delay, then a full delay again
    arm = 1'b1; n_arm++; clocks(3);
    win = 1'b1; clocks(1); win = 1'b0;
    clocks(4 * DIV);
    arm = 1'b0; n_abort++;
    clocks(2 * DIV);
    check(!siren, "no alarm after disarm during delay");
    arm = 1'b1; n_arm++; clocks(3);
    intrude(1, waited);
    check(siren && waited > 6 * DIV && waited <= 7 * DIV + 1,
          $sformatf("full delay after abort: %0d clocks", waited));
    arm = 1'b0; clocks(2);

    // every mechanism must have happened
    for (int f = 0; f < 8; f++) check(alu_fn[f] > 0, $sformatf("ALU function %0d never used", f));
    for (int s = 0; s < 3; s++) check(n_intrusion[s] > 0, "sensor never triggered");
    for (int d = 0; d < 8; d++) check(digit_seen[d], $sformatf("display never showed %0d", d));
    check(n_arm > 0 && n_alarm > 0 && n_disarm_alarm > 0 && n_abort > 0 && n_cat_toggle > 2,
          "a security mechanism never occurred");
    $display("arm=%0d intrusions=%0d/%0d/%0d alarms=%0d disarm_from_alarm=%0d aborts=%0d cat_toggles=%0d",
             n_arm, n_intrusion[0], n_intrusion[1], n_intrusion[2], n_alarm, n_disarm_alarm,
             n_abort, n_cat_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
