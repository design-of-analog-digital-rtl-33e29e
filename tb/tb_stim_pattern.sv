// tb_stim_pattern: programs periodic stimulation trains on a few neurons and
// checks the interval between events (period x MS_DIV clocks), the weights,
// that disabled or unprogrammed neurons stay quiet, and that a new write
// restarts a train.
// Periods and weights are arbitrary test values; MS_DIV is shrunk to 10 clocks.
module tb_stim_pattern;
  import neuro_pkg::*;
  localparam int NN = 25, MS = 10;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_en = 0;
  logic [4:0] cfg_n = 0;
  logic [15:0] cfg_period = 0;
  weight_t cfg_weight = 0;
  logic [NN-1:0] stim;
  weight_t stim_w [NN];
  int checks = 0, failures = 0, cyc = 0;
  int last [NN], cnt [NN];

  stim_pattern #(.N_NEURONS(NN), .MS_DIV(MS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int expect_period [NN];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < NN; n++)
      if (stim[n]) begin
        if (last[n] >= 0)
          check(cyc - last[n] == expect_period[n] * MS,
                $sformatf("neuron %0d interval %0d", n, cyc - last[n]));
        last[n] = cyc;
        cnt[n]++;
      end
  end

  task automatic prog(input int n, input bit en, input int p, input int w);
    @(negedge clk);
    cfg_we = 1; cfg_n = 5'(n); cfg_en = en; cfg_period = 16'(p); cfg_weight = weight_t'(w);
    @(negedge clk);
    cfg_we = 0;
    expect_period[n] = p; last[n] = -1; cnt[n] = 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (last[n]) begin last[n] = -1; cnt[n] = 0; expect_period[n] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    prog(3, 1, 5, 100);
    prog(24, 1, 7, 1023);
    prog(10, 0, 2, 50);
    repeat (40 * MS + 5) @(negedge clk);
    check(cnt[3] == 8, $sformatf("neuron 3: %0d events in 40 ms", cnt[3]));
    check(cnt[24] == 5, $sformatf("neuron 24: %0d events in 40 ms", cnt[24]));
    check(cnt[10] == 0, "disabled neuron quiet");
    check(stim_w[3] == 100 && stim_w[24] == 1023, "weights");
    begin
      automatic int others = 0;
      for (int n = 0; n < NN; n++) if (n != 3 && n != 24) others += cnt[n];
      check(others == 0, "unprogrammed neurons quiet");
    end
    prog(3, 1, 2, 7);
    repeat (20 * MS + 5) @(negedge clk);
    check(cnt[3] == 10, $sformatf("neuron 3 after reprogramming: %0d events", cnt[3]));
    check(stim_w[3] == 7, "new weight");
    prog(24, 0, 7, 0);
    repeat (20 * MS) @(negedge clk);
    check(cnt[24] == 0, "train stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
