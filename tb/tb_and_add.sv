// tb_and_add: exhaustive check of the pass / add / AND stage; cout must
// be the adder's carry in every mode.
module tb_and_add;
  logic [3:0] a, b, y, exp_y;
  logic       and_n_add, n_pass, cin, cout;
  logic [4:0] sum;
  int checks = 0, failures = 0;

  and_add dut (.a(a), .b(b), .and_n_add(and_n_add), .n_pass(n_pass), .cin(cin),
               .y(y), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin
      {and_n_add, n_pass, cin, b, a} = 11'(i);
      #1;
      sum = 5'(a) + 5'(b) + 5'(cin);
      if (!n_pass)        exp_y = a;
      else if (and_n_add) exp_y = a & b;
      else                exp_y = sum[3:0];
      checks++;
      if (y !== exp_y || cout !== sum[4]) begin
        failures++;
        $display("FAIL a=%h b=%h and=%b pass_n=%b cin=%b -> y=%h cout=%b", a, b,
                 and_n_add, n_pass, cin, y, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
