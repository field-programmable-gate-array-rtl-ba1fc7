// tb_mux4: exhaustive check of the two-way multiplexer (select 1 = a).
module tb_mux4;
  logic [3:0] a, b, y;
  logic       sel;
  int checks = 0, failures = 0;

  mux4 dut (.a(a), .b(b), .a_n_b(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {sel, b, a} = 9'(i);
      #1;
      checks++;
      if (y !== (sel ? a : b)) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b -> y=%h", a, b, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
