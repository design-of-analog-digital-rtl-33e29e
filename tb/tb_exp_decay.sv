// tb_exp_decay: checks the exponential generator against a step-by-step
// reference (Q <- Q - floor(Q/1024)), the load priority of init over step,
// and that 1024 steps bring 1.0 to within 0.5 % of exp(-1).
module tb_exp_decay;
  localparam int N = 10;
  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [2*N-1:0] f0 = '0, q;
  int checks = 0, failures = 0;
  longint ref_q;

  exp_decay #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 check(q == 0, "reset value");
    rst_n = 1;
    @(negedge clk); f0 = '1; init = 1;
    @(negedge clk); init = 0;
    check(q == 20'hFFFFF, "init loads f0");
    ref_q = 20'hFFFFF;
    for (int s = 0; s < 1024; s++) begin
      step = 1; @(negedge clk);
      ref_q = ref_q - (ref_q >> N);
      if (s % 64 == 63) check(q == ref_q[19:0], $sformatf("step %0d q=%0h ref=%0h", s, q, ref_q));
    end
    step = 0;
    // exp(-1) * (2^20-1) = 385749
    check(q > 20'd383800 && q < 20'd387700, $sformatf("1024 steps ~ exp(-1): %0d", q));
    // hold without step
    repeat (5) @(negedge clk);
    check(q == ref_q[19:0], "holds without step");
    // init wins over step
    f0 = 20'h12345; init = 1; step = 1; @(negedge clk); init = 0; step = 0;
    check(q == 20'h12345, "init has priority");
    // small values stop decaying below 2^N
    f0 = 20'd1000; init = 1; @(negedge clk); init = 0; step = 1; @(negedge clk); step = 0;
    check(q == 20'd1000, "value below 2^N does not change");
    f0 = 20'd5000; init = 1; @(negedge clk); init = 0; step = 1; @(negedge clk); step = 0;
    check(q == 20'd4996, "5000 - 4 = 4996");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
