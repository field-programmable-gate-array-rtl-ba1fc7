// tb_fa4: exhaustive check of the 4-bit adder against a + b + cin.
module tb_fa4;
  logic [3:0] a, b, y;
  logic       cin, cout;
  int checks = 0, failures = 0;

  fa4 dut (.a(a), .b(b), .cin(cin), .y(y), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, b, a} = 9'(i);
      #1;
      checks++;
      if ({cout, y} !== 5'(a) + 5'(b) + 5'(cin)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> cout=%b y=%h", a, b, cin, cout, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
