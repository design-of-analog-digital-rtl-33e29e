// tb_neuron_traces: restarts single neurons and checks that all four traces
// of that neuron (and only that neuron) jump to 1.0 and then follow
// (1 - 2^-10)^k, with k the number of elapsed ticks of each time constant.
module tb_neuron_traces;
  import neuro_pkg::*;
  localparam int NN = 4;
  localparam int TP [4] = '{3, 5, 4, 7};
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] restart = '0;
  trace_t tr_p [NN], tr_q [NN], tr_pre [NN], tr_post [NN];
  int checks = 0, failures = 0;

  neuron_traces #(.N_NEURONS(NN), .TICK_P(3), .TICK_Q(5), .TICK_PRE(4), .TICK_POST(7)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint decay(input int k);
    longint v = 20'hFFFFF;
    for (int s = 0; s < k; s++) v = v - (v >> 10);
    return v;
  endfunction

  // value must equal the reference after floor or ceil of cycles/period ticks
  function automatic bit near(input trace_t v, input int cycles, input int period);
    int k = cycles / period;
    return (v == trace_t'(decay(k))) || (v == trace_t'(decay(k + 1)));
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int n = 0; n < NN; n++)
      check(tr_p[n] == 0 && tr_q[n] == 0 && tr_pre[n] == 0 && tr_post[n] == 0, "zero after reset");
    restart[2] = 1; @(negedge clk); restart = '0;
    check(tr_p[2] == '1 && tr_q[2] == '1 && tr_pre[2] == '1 && tr_post[2] == '1, "restart to 1.0");
    check(tr_p[1] == 0 && tr_q[3] == 0, "other neurons untouched");
    for (int c = 1; c <= 600; c++) begin
      @(negedge clk);
      if (c % 50 == 0) begin
        check(near(tr_p[2], c, TP[0]), $sformatf("P at %0d: %0h", c, tr_p[2]));
        check(near(tr_q[2], c, TP[1]), $sformatf("Q at %0d", c));
        check(near(tr_pre[2], c, TP[2]), $sformatf("pre at %0d", c));
        check(near(tr_post[2], c, TP[3]), $sformatf("post at %0d", c));
      end
    end
    check(tr_p[2] < tr_pre[2] && tr_pre[2] < tr_q[2] && tr_q[2] < tr_post[2], "shorter tau decays faster");
    restart[0] = 1; restart[2] = 1; @(negedge clk); restart = '0;
    check(tr_p[0] == '1 && tr_post[2] == '1 && tr_p[1] == 0, "two restarts together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
