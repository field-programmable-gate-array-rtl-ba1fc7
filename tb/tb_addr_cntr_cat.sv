// tb_addr_cntr_cat: with SCAN_BITS = 2 the digit select toggles every 4
// clocks; the count advances on ce only while run_timer is high and
// clears when it falls; addr = {count, cat_control}.
module tb_addr_cntr_cat;
  logic       clk = 1'b0;
  logic       run_timer = 1'b0, ce = 1'b0;
  logic [4:0] addr;
  logic       cat_control;
  int checks = 0, failures = 0;
  int model = 0, cycle = 0;

  addr_cntr_cat #(.SCAN_BITS(2)) dut (.clk(clk), .run_timer(run_timer), .ce(ce),
                                      .addr(addr), .cat_control(cat_control));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent model of the count, updated at each clock edge
  always @(posedge clk) begin
    if (!run_timer) model <= 0;
    else if (ce)    model <= (model + 1) % 16;
    cycle <= cycle + 1;
  end

  initial begin
    for (int step = 0; step < 600; step++) begin
      @(negedge clk);
      checks++;
      if (addr[4:1] !== 4'(model) || cat_control !== ((cycle / 4) % 2 == 1) ||
          addr[0] !== cat_control) begin
        failures++;
        $display("FAIL cycle %0d: addr=%b cat=%b model=%0d", cycle, addr, cat_control, model);
      end
      ce        = ($urandom % 3 == 0);
      run_timer = (step % 150) < 120;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
