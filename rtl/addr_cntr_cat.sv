// addr_cntr_cat: display address counter with digit-scan (CAT) control.
//
// Drives a two-digit multiplexed 7-segment display that shows how many
// timer ticks have passed while the alarm delay runs. Two counters run
// from the board clock:
//   * a seconds counter that advances on each `ce` tick while `run_timer`
//     is high and returns to 0 while it is low, so the display reads 00
//     outside the delay;
//   * a scan divider whose top bit is `cat_control`, toggling every
//     2**SCAN_BITS clocks to select the units (0) or tens (1) digit.
// The memory address is {seconds[3:0], cat_control}, so the pattern
// memory holds one word per count and digit.
//
// The document names the block and its ports (CLK, RUN_TIMER, CE, a 5-bit
// ADDR and CAT_CONTROL) and says it is an address counter with a scan
// signal; the address layout, the clear-while-idle rule and the scan rate
// (381 Hz toggling at 50 MHz by default) are this design's choices.
// Outputs are registered; counters power up at 0 (no reset port).
module addr_cntr_cat #(
  parameter int unsigned SCAN_BITS = 16
) (
  input  logic       clk,
  input  logic       run_timer,
  input  logic       ce,
  output logic [4:0] addr,
  output logic       cat_control
);

  logic [3:0]         seconds = '0;
  logic [SCAN_BITS:0] scan    = '0;

  always_ff @(posedge clk) begin
    if (!run_timer)
      seconds <= '0;
    else if (ce)
      seconds <= seconds + 1'b1;
  end

  always_ff @(posedge clk)
    scan <= scan + 1'b1;

  assign cat_control = scan[SCAN_BITS];
  assign addr        = {seconds, cat_control};

endmodule
