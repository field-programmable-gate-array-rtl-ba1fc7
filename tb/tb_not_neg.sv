// tb_not_neg: exhaustive check of the pass / one's / two's complement
// stage against its truth table, carry included.
module tb_not_neg;
  logic [3:0] a, y, exp_y;
  logic       n_pass, not_n_neg, cry, exp_cry;
  int checks = 0, failures = 0;

  not_neg dut (.a(a), .n_pass(n_pass), .not_n_neg(not_n_neg), .y(y), .cry(cry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {n_pass, not_n_neg, a} = 6'(i);
      #1;
      if (!n_pass)        begin exp_y = a;             exp_cry = 1'b0;        end
      else if (not_n_neg) begin exp_y = 4'hF - a;      exp_cry = 1'b0;        end
      else                begin exp_y = 4'(16 - a);    exp_cry = (a == 4'h0); end
      checks++;
      if (y !== exp_y || cry !== exp_cry) begin
        failures++;
        $display("FAIL a=%h pass_n=%b not_n_neg=%b -> y=%h cry=%b, want %h %b",
                 a, n_pass, not_n_neg, y, cry, exp_y, exp_cry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
