// security_pkg: types and helpers shared by the security-alarm modules.
//
// sec_state_t is the four-state encoding of the alarm controller
// (DISARMED, ARMED, WAIT_DELAY, ALARM). seg7() gives the 7-segment
// pattern of a decimal digit for the two-digit timer display; the bit
// order (bit0 = segment a .. bit6 = segment g, bit7 = decimal point) and
// the active-high polarity are this design's choice.
package security_pkg;

  typedef enum logic [1:0] {
    DISARMED   = 2'd0,
    ARMED      = 2'd1,
    WAIT_DELAY = 2'd2,
    ALARM      = 2'd3
  } sec_state_t;

  // Segments:   aaa
  //            f   b
  //             ggg
  //            e   c
  //             ddd
  function automatic logic [7:0] seg7(input logic [3:0] digit);
    unique case (digit)
      4'd0:    seg7 = 8'b0011_1111;
      4'd1:    seg7 = 8'b0000_0110;
      4'd2:    seg7 = 8'b0101_1011;
      4'd3:    seg7 = 8'b0100_1111;
      4'd4:    seg7 = 8'b0110_0110;
      4'd5:    seg7 = 8'b0110_1101;
      4'd6:    seg7 = 8'b0111_1101;
      4'd7:    seg7 = 8'b0000_0111;
      4'd8:    seg7 = 8'b0111_1111;
      4'd9:    seg7 = 8'b0110_1111;
      default: seg7 = 8'b0100_0000;  // '-' for anything that is not a digit
    endcase
  endfunction

endpackage
