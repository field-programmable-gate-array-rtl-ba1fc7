// tb_inc4: exhaustive check of the 4-bit incrementer against a + inc.
module tb_inc4;
  logic [3:0] a, y;
  logic       inc, cry;
  int checks = 0, failures = 0;

  inc4 dut (.a(a), .inc(inc), .y(y), .cry(cry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {inc, a} = 5'(i);
      #1;
      checks++;
      if ({cry, y} !== 5'(a) + 5'(inc)) begin
        failures++;
        $display("FAIL a=%h inc=%b -> cry=%b y=%h", a, inc, cry, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
