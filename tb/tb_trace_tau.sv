// tb_trace_tau: runs the four STDP traces at their real time constants. The
// trace block is used with every parameter at its default (25 neurons, 50 MHz
// ticks for tau_p = 14.8 ms, tau_q = 33.8 ms, tau_pre = 28 ms and
// tau_post = 88 ms). Neuron 0 restarts at time 0 and neuron 24 3 ms later;
// every trace is sampled at tau/2, tau and 2*tau after its restart and must
// be within 1 % of full scale of exp(-0.5), exp(-1) and exp(-2). Neurons that
// never restarted must stay at 0. About 94 ms of device time is simulated.
module tb_trace_tau;
  import neuro_pkg::*;
  localparam int NN = 25;
  localparam real CLK_NS = 20.0;
  localparam real TAU_MS [4] = '{14.8, 33.8, 28.0, 88.0};
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] restart = '0;
  trace_t tr_p [NN], tr_q [NN], tr_pre [NN], tr_post [NN];
  int checks = 0, failures = 0;
  longint cyc = 0;

  neuron_traces dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real value(input int k, input int n);
    trace_t t;
    case (k)
      0: t = tr_p[n];
      1: t = tr_q[n];
      2: t = tr_pre[n];
      default: t = tr_post[n];
    endcase
    return real'(t) / real'(2 ** TR_BITS);
  endfunction

  // sample time (clock count after restart) of trace k at m/2 time constants
  function automatic longint when(input int k, input int m);
    return longint'(TAU_MS[k] * 1.0e6 / CLK_NS * m / 2.0);
  endfunction

  longint t0 [2];
  int nrn [2] = '{0, 24};
  string nm [4] = '{"p", "q", "pre", "post"};

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // samples for both restarted neurons, all traces, at tau/2, tau and 2 tau
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      for (int r = 0; r < 2; r++)
        if (t0[r] > 0)
          for (int k = 0; k < 4; k++)
            for (int m = 1; m <= 4; m *= 2)
              if (cyc - t0[r] == when(k, m)) begin
                real got, want;
                got  = value(k, nrn[r]);
                want = $exp(-real'(m) / 2.0);
                check(got > want - 0.01 && got < want + 0.01,
                      $sformatf("neuron %0d tr_%s at %0d/2 tau: %f, expected %f", nrn[r], nm[k], m, got, want));
              end
    end
  end

  initial begin
    t0[0] = 0; t0[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    restart[0] = 1; @(negedge clk); restart[0] = 0;
    t0[0] = cyc;                               // traces reloaded at this clock
    check(value(0, 0) > 0.999 && value(3, 0) > 0.999, "restart to full scale");
    repeat (150_000) @(negedge clk);           // 3 ms
    restart[24] = 1; @(negedge clk); restart[24] = 0;
    t0[1] = cyc;
    repeat (int'(when(3, 4)) + 10) @(negedge clk);
    for (int n = 1; n < 24; n++)
      check(tr_p[n] == 0 && tr_q[n] == 0 && tr_pre[n] == 0 && tr_post[n] == 0,
            $sformatf("neuron %0d idle", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
