// tb_spike_input: asynchronous pulses on the spike pins must give exactly one
// one-clock event per rising edge, three clocks after the pin rose, and the
// time stamp must count one every US_DIV clocks.
module tb_spike_input;
  localparam int NN = 25, DIV = 5;
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] spike_pad = '0, spike;
  logic [31:0] timestamp;
  int checks = 0, failures = 0;
  int cnt [NN];
  int cyc = 0;

  spike_input #(.N_NEURONS(NN), .US_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int n = 0; n < NN; n++) cnt[n] += int'(spike[n]);
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ts0, c0;
    foreach (cnt[n]) cnt[n] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency
    @(posedge clk); #2 spike_pad[4] = 1;
    @(posedge clk); #1 check(spike == 0, "no event after 1 clock");
    @(posedge clk); #1 check(spike == 0, "no event after 2 clocks");
    @(posedge clk); #1 check(spike == 25'(1) << 4, "event after 3 clocks");
    @(posedge clk); #1 check(spike == 0, "event lasts one clock");
    repeat (10) @(posedge clk);
    spike_pad[4] = 0;
    check(cnt[4] == 1, "held pin gives one event");
    // random pulses at random times
    for (int t = 0; t < 30; t++) begin
      int n;
      n = $urandom % NN;
      #($urandom % 37 + 1);
      spike_pad[n] = 1;
      #($urandom % 50 + 40);
      spike_pad[n] = 0;
      #($urandom % 30 + 30);
      repeat (4) @(posedge clk);
      check(cnt[n] == 1 + int'(n == 4), $sformatf("neuron %0d events %0d", n, cnt[n]));
      cnt[n] = int'(n == 4);
    end
    // time stamp rate
    ts0 = int'(timestamp); c0 = cyc;
    repeat (1000) @(posedge clk);
    #1 check(int'(timestamp) - ts0 == (cyc - c0) / DIV || int'(timestamp) - ts0 == (cyc - c0) / DIV + 1,
          $sformatf("timestamp advanced %0d in %0d clocks", int'(timestamp) - ts0, cyc - c0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
