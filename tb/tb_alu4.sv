// tb_alu4: the ALU's function table, first the eight worked rows (inputs
// and expected results in hex, Cin = 0), then every combination of
// operands, carry and controls against an arithmetic model.
module tb_alu4;
  logic [3:0] a, b, y, exp_y;
  logic       cin, logic_n_arith, invert, n_a_only, cout, neg_cry;
  logic [3:0] z;
  logic [4:0] sum;
  int checks = 0, failures = 0;

  alu4 dut (.a(a), .b(b), .cin(cin), .logic_n_arith(logic_n_arith), .invert(invert),
            .n_a_only(n_a_only), .y(y), .cout(cout), .neg_cry(neg_cry));

  // {n_a_only, logic_n_arith, invert, a, b, expected y}
  typedef struct packed {
    logic [2:0] ctl;
    logic [3:0] a, b, y;
  } row_t;
  localparam row_t ROWS [8] = '{
    '{3'b000, 4'hE, 4'hD, 4'hE},   // pass A
    '{3'b001, 4'hC, 4'hE, 4'h4},   // two's complement of A
    '{3'b010, 4'hF, 4'h9, 4'hF},   // pass A
    '{3'b011, 4'hF, 4'hC, 4'h0},   // one's complement of A
    '{3'b100, 4'h2, 4'h5, 4'h7},   // A + B
    '{3'b101, 4'hF, 4'hA, 4'hB},   // -A + B
    '{3'b110, 4'hF, 4'h8, 4'h8},   // A AND B
    '{3'b111, 4'h2, 4'h5, 4'h5}    // ~A AND B
  };

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cin = 1'b0;
    foreach (ROWS[r]) begin
      {n_a_only, logic_n_arith, invert} = ROWS[r].ctl;
      a = ROWS[r].a;
      b = ROWS[r].b;
      #1;
      checks++;
      if (y !== ROWS[r].y) begin
        failures++;
        $display("FAIL table row %0d: y=%h want %h", r, y, ROWS[r].y);
      end
    end
    for (int i = 0; i < 4096; i++) begin
      {n_a_only, logic_n_arith, invert, cin, b, a} = 12'(i);
      #1;
      if (!invert)           z = a;
      else if (logic_n_arith) z = ~a;
      else                   z = 4'(-a);
      sum = 5'(z) + 5'(b) + 5'(cin);
      if (!n_a_only)          exp_y = z;
      else if (logic_n_arith) exp_y = z & b;
      else                    exp_y = sum[3:0];
      checks++;
      if (y !== exp_y || cout !== sum[4] ||
          neg_cry !== (invert && !logic_n_arith && a == 4'h0)) begin
        failures++;
        $display("FAIL ctl=%b%b%b a=%h b=%h cin=%b -> y=%h cout=%b, want %h %b",
                 n_a_only, logic_n_arith, invert, a, b, cin, y, cout, exp_y, sum[4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
