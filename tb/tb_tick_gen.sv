// tb_tick_gen: checks that the prescaler pulses for exactly one clock every
// PERIOD clocks, for a short period and for the 976-clock default.
module tb_tick_gen;
  logic clk = 0, rst_n = 0;
  logic tick7, tickd;
  int checks = 0, failures = 0;

  tick_gen #(.PERIOD(7)) dut7 (.clk, .rst_n, .tick(tick7));
  tick_gen dutd (.clk, .rst_n, .tick(tickd));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last7 = -1, lastd = -1, n7 = 0, nd = 0, cyc = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5000) begin
      @(posedge clk); #1 cyc++;
      if (tick7) begin
        if (last7 >= 0) check(cyc - last7 == 7, $sformatf("period 7 got %0d", cyc - last7));
        last7 = cyc; n7++;
      end
      if (tickd) begin
        if (lastd >= 0) check(cyc - lastd == 976, $sformatf("period 976 got %0d", cyc - lastd));
        lastd = cyc; nd++;
      end
    end
    check(n7 >= 700 && n7 <= 715, $sformatf("tick count %0d", n7));
    check(nd == 5, $sformatf("default tick count %0d", nd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
