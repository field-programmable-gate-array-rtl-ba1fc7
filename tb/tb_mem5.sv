// tb_mem5: reads all 32 words of the display memory and compares them with
// a hand-written 7-segment table (bit0 = a .. bit6 = g, active high).
module tb_mem5;
  logic [4:0] addr;
  logic [7:0] led_out;
  int checks = 0, failures = 0;

  // segments lit per digit, written as the letters a..g
  localparam string LIT [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                                 "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic logic [7:0] pattern(int d);
    logic [7:0] p = '0;
    for (int k = 0; k < LIT[d].len(); k++) p[3'(LIT[d][k] - "a")] = 1'b1;
    return p;
  endfunction

  mem5 dut (.addr(addr), .led_out(led_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int d = 0; d < 2; d++) begin
        addr = 5'(2 * v + d);
        #1;
        checks++;
        if (led_out !== pattern(d != 0 ? v / 10 : v % 10)) begin
          failures++;
          $display("FAIL value %0d digit %0d: %b", v, d, led_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
