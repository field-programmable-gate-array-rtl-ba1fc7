// tb_clk_div: with DIV_BITS = 4 the tick must be one clock wide, arrive
// first on the 15th clock edge after power-up and then every 16 clocks.
module tb_clk_div;
  logic clk = 1'b0;
  logic ce;
  int checks = 0, failures = 0;
  int cycle = 0, last = -1, pulses = 0;

  clk_div #(.DIV_BITS(4)) dut (.clk(clk), .ce(ce));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) begin
      @(negedge clk);
      if (ce) begin
        checks++;
        if (last < 0 ? cycle != 14 : cycle - last != 16) begin
          failures++;
          $display("FAIL tick at cycle %0d (previous %0d)", cycle, last);
        end
        last = cycle;
        pulses++;
      end
      cycle++;
    end
    checks++;
    if (pulses != 12) begin
      failures++;
      $display("FAIL %0d ticks in 200 clocks", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
