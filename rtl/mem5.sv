// mem5: 32 x 8 pattern memory for the two-digit 7-segment timer display.
//
// Read-only and combinational: led_out = rom[addr]. The address is
// {value[3:0], digit}; the word holds the 7-segment pattern of the units
// digit of `value` when digit = 0 and of its tens digit when digit = 1,
// so values 0..15 read as 00..15. The table is computed at elaboration
// from security_pkg::seg7 (bit0 = a .. bit6 = g, bit7 = decimal point,
// active high). The document gives the block's size (5-bit address,
// 8-bit data) and purpose; the contents and encoding are this design's.
module mem5
  import security_pkg::*;
(
  input  logic [4:0] addr,
  output logic [7:0] led_out
);

  localparam int DEPTH = 32;

  typedef logic [7:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < DEPTH; i++) begin
      int value;
      value = i / 2;
      r[i]  = (i % 2 == 1) ? seg7(4'(value / 10)) : seg7(4'(value % 10));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign led_out = ROM[addr];

endmodule
