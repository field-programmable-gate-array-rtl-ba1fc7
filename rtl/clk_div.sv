// clk_div: timer-tick generator for the security system.
//
// Divides the board clock down to the rate of the delay timer and of the
// timer display. A free-running DIV_BITS-bit counter is incremented every
// clock; `ce` is high for exactly one clock whenever the counter holds
// its all-ones value, so one pulse occurs every 2**DIV_BITS clocks. With
// the default DIV_BITS = 25 and a 50 MHz clock that is 50e6 / 2**25 =
// 1.49 Hz, the rate the lab calls for. The lab's divider output is named
// as a clock enable (CE) by its user; producing a single-cycle enable
// instead of a slow clock is this design's choice and keeps the whole
// system in one clock domain.
//
// Timing: the first pulse comes 2**DIV_BITS - 1 clocks after power-up;
// the counter starts from 0 as an FPGA configuration loads it (there is
// no reset port).
module clk_div #(
  parameter int unsigned DIV_BITS = 25
) (
  input  logic clk,
  output logic ce
);

  logic [DIV_BITS-1:0] count = '0;

  always_ff @(posedge clk)
    count <= count + 1'b1;

  assign ce = &count;

endmodule
