// tb_lab_top_full: one complete alarm operation of the top at its default
// sizes (timer tick every 2**25 clocks, 1.49 Hz at 50 MHz; digit scan
// every 2**16 clocks). The ALU's worked table and one two's complement
// are checked once, then the
// security system is armed, the front door opened, and the siren must rise
// 6 to 7 tick periods later; meanwhile the display, sampled a few times
// per tick, must step through the units digits 0..6 with a tens digit of
// 0 (7 is shown for a single clock, on the way into ALARM). Disarming must stop the siren. About 2.4e8 clocks are simulated.
module tb_lab_top_full;
  localparam longint TICK = 64'd1 << 25;
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
  // {n_a_only, logic_n_arith, invert}, a, b, result from the worked table
  localparam logic [14:0] ROWS [8] = '{
    {3'b000, 4'hE, 4'hD, 4'hE}, {3'b001, 4'hC, 4'hE, 4'h4},
    {3'b010, 4'hF, 4'h9, 4'hF}, {3'b011, 4'hF, 4'hC, 4'h0},
    {3'b100, 4'h2, 4'h5, 4'h7}, {3'b101, 4'hF, 4'hA, 4'hB},
    {3'b110, 4'hF, 4'h8, 4'h8}, {3'b111, 4'h2, 4'h5, 4'h5}};
  bit digit_seen [10];
  longint t_open, waited, t_siren = 0;

  always @(posedge siren) if (t_siren == 0) t_siren = $time;

  lab_top dut (
    .alu_a(alu_a), .alu_b(alu_b), .alu_cin(alu_cin), .alu_logic_n_arith(alu_logic_n_arith),
    .alu_invert(alu_invert), .alu_n_a_only(alu_n_a_only), .alu_y(alu_y), .alu_cout(alu_cout),
    .alu_neg_cry(alu_neg_cry), .tc_a(tc_a), .tc_y(tc_y), .tc_cry(tc_cry),
    .clk(clk), .arm(arm), .front_door(front), .rear_door(rear), .window(win), .siren(siren),
    .arm_ind(arm_ind), .front_door_ind(front_ind), .rear_door_ind(rear_ind),
    .window_ind(win_ind), .leds(leds), .cat_control(cat));

  always #5 clk = ~clk;   // clock period 10 time units

  initial begin : watchdog
    #(10 * 12 * TICK);
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

  initial begin
    alu_cin = 1'b0;
    foreach (ROWS[r]) begin
      {alu_n_a_only, alu_logic_n_arith, alu_invert, alu_a, alu_b} = ROWS[r][14:4];
      #1;
      check(alu_y == ROWS[r][3:0], $sformatf("ALU table row %0d: y=%h", r, alu_y));
    end

    tc_a = 4'h3;
    #1 check(tc_y == 4'hD && !tc_cry, "two's complement of 3");

    @(negedge clk);
    arm = 1'b1;
    repeat (10) @(negedge clk);
    check(!siren && leds == SEG[0], "armed and quiet");
    front = 1'b1;
    t_open = $time;
    @(negedge clk);
    front = 1'b0;
    // sample the display until the siren sounds
    while (!siren && $time - t_open < 10 * 8 * TICK) begin
      #(10 * (TICK / 8) + 3);
      for (int d = 0; d < 10; d++)
        if (!cat && leds == SEG[d]) digit_seen[d] = 1'b1;
      if (cat) check(leds == SEG[0], "tens digit shows 0");
    end
    wait (siren);
    waited = (t_siren - t_open) / 10;
    check(waited > 6 * TICK && waited <= 7 * TICK + 1,
          $sformatf("siren after %0d clocks, expected 6 to 7 ticks of %0d", waited, TICK));
    for (int d = 0; d < 7; d++) check(digit_seen[d], $sformatf("display never showed %0d", d));
    repeat (1000) @(negedge clk);
    check(siren && leds == SEG[0], "alarm holds, display back to 00");
    arm = 1'b0;
    #1 check(!siren, "disarm stops the siren");
    $display("siren after %0d clocks (%0.2f ticks)", waited, real'(waited) / real'(TICK));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
