// tb_twos_comp4: exhaustive check of the two's complement circuit against
// 16 - a (and a carry only for a = 0).
module tb_twos_comp4;
  logic [3:0] a, y;
  logic       cry;
  int checks = 0, failures = 0;

  twos_comp4 dut (.a(a), .y(y), .cry(cry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      checks++;
      if (y !== 4'((16 - i) % 16) || cry !== (i == 0)) begin
        failures++;
        $display("FAIL a=%h -> y=%h cry=%b", a, y, cry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
