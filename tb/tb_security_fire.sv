// tb_security_fire: the security system built with the fire-sensor variant
// (FIRE_SENSOR = 1, rear_door is the fire input), short divider
// (DIV_BITS = 4, tick every 16 clocks). Fire must drive siren and sprinkler
// at once whether the system is disarmed, armed or in the entry delay, and
// must not start the delay; the front door and window still give the
// normal delayed alarm without the sprinkler.
module tb_security_fire;
  localparam int DIV = 16;
  localparam logic [7:0] ZERO = 8'h3F;

  logic clk = 1'b0;
  logic arm = 1'b0, front = 1'b0, fire = 1'b0, win = 1'b0;
  logic siren, sprinkler, arm_ind, front_ind, rear_ind, win_ind, cat;
  logic [7:0] leds;
  int checks = 0, failures = 0;
  int waited;

  security #(.DIV_BITS(4), .SCAN_BITS(2), .FIRE_SENSOR(1'b1)) dut (
    .clk(clk), .arm(arm), .front_door(front), .rear_door(fire), .window(win),
    .siren(siren), .sprinkler(sprinkler), .arm_ind(arm_ind), .front_door_ind(front_ind),
    .rear_door_ind(rear_ind), .window_ind(win_ind), .leds(leds), .cat_control(cat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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
    repeat (3) @(negedge clk);
    fire = 1'b1; #1;
    check(siren && sprinkler, "fire while disarmed acts at once");
    fire = 1'b0; #1;
    check(!siren && !sprinkler, "fire gone");

    arm = 1'b1;
    repeat (3) @(negedge clk);
    fire = 1'b1; #1;
    check(siren && sprinkler, "fire while armed acts at once");
    repeat (10 * DIV) @(negedge clk);
    check(leds == ZERO && rear_ind, "fire does not start the entry delay");
    fire = 1'b0; #1;
    check(!siren && !sprinkler, "armed, fire gone, no alarm");

    win = 1'b1; @(negedge clk); win = 1'b0;
    waited = 1;
    repeat (3 * DIV) begin @(negedge clk); waited++; end
    fire = 1'b1; #1;
    check(siren && sprinkler, "fire during the entry delay acts at once");
    fire = 1'b0; #1;
    check(!siren, "delay still running after fire");
    while (!siren && waited < 20 * DIV) begin @(negedge clk); waited++; end
    check(siren && !sprinkler && waited > 6 * DIV && waited <= 7 * DIV + 1,
          $sformatf("window alarm after %0d clocks, without sprinkler", waited));
    arm = 1'b0; #1;
    check(!siren, "disarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
