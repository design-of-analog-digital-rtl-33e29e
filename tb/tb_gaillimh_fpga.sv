// tb_gaillimh_fpga: end-to-end test of the FPGA at reduced time scales
// (2 MHz clock, 250 kbaud, short trace ticks) so that it runs in seconds.
// A host model talks to the FPGA over its serial line; serial DAC models and
// a model of one chip's memory-cell pointer check the parameter refresh; a
// serial receiver checks the topology words. The test configures synapses
// (plastic and fixed, one inhibitory source), soft bounds, parameters and
// topology, then makes neurons spike and checks: synaptic triggers, LTP and
// LTD on the plastic synapses (read back over the serial line), no change on
// the fixed one, time-stamped spike reports, the STDP time for 25 simultaneous
// spikes (under 30 us), a predefined stimulation train, merging of a repeated spike, and event drops when the
// serial line cannot keep up. Each of these mechanisms is counted and must
// occur at least once.
module tb_gaillimh_fpga;
  import neuro_pkg::*;
  localparam int CLK_HZ = 2_000_000, BAUD = 250_000, SER_HALF = 120;
  localparam int TICK_P = 4, TICK_Q = 9, TICK_PRE = 7, TICK_POST = 22;
  localparam int DIV = CLK_HZ / BAUD;
  localparam int NN = 25, NC = 5;

  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd;
  logic [NN-1:0] spike_pad = '0, syn_exc, syn_inh;
  logic [NC-1:0] topo_clk, topo_data, topo_valid, mc_clk, mc_reset_n, mc_enable_n;
  logic [NC-1:0] dac_sclk, dac_din, dac_cs_n, topo_busy, topo_done, refresh_round;
  logic [15:0] events_dropped;
  logic stdp_busy, stdp_event, stdp_merged;
  int checks = 0, failures = 0;

  gaillimh_fpga #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .TICK_P(TICK_P), .TICK_Q(TICK_Q),
                  .TICK_PRE(TICK_PRE), .TICK_POST(TICK_POST), .SER_HALF(SER_HALF)) dut (.*);
  always #10 clk = ~clk;   // 20 ns

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- host model
  logic [7:0] rxq [$];
  task automatic host_send(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin uart_rxd = f[i]; repeat (DIV) @(posedge clk); end
  endtask
  task automatic cmd(input logic [7:0] b [$]);
    foreach (b[k]) host_send(b[k]);
    repeat (4) @(posedge clk);
  endtask
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (DIV / 2) @(posedge clk);
      if (uart_txd) continue;
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = uart_txd; end
      repeat (DIV) @(posedge clk);
      rxq.push_back(b);
    end
  end
  // frame parser
  int n_spike_frames = 0, n_weight_frames = 0;
  int spike_n [$];
  longint spike_t [$];
  int rd_w [NN][NN];
  initial begin
    forever begin
      wait (rxq.size() > 0);
      if (rxq[0] == RSP_SPIKE) begin
        wait (rxq.size() >= 6);
        spike_n.push_back(int'(rxq[1]));
        spike_t.push_back({rxq[2], rxq[3], rxq[4], rxq[5]});
        n_spike_frames++;
        repeat (6) void'(rxq.pop_front());
      end else if (rxq[0] == RSP_WEIGHT) begin
        wait (rxq.size() >= 5);
        rd_w[rxq[1]][rxq[2]] = int'({rxq[3][1:0], rxq[4]});
        n_weight_frames++;
        repeat (5) void'(rxq.pop_front());
      end else begin
        check(0, $sformatf("unexpected byte %h", rxq[0]));
        void'(rxq.pop_front());
      end
    end
  end
  task automatic read_w(input int j, input int i, output int w);
    int n0 = n_weight_frames;
    cmd('{CMD_READ_W, 8'(j), 8'(i)});
    while (n_weight_frames == n0) @(posedge clk);
    w = rd_w[j][i];
  endtask

  // ---------------------------------------------------------------- chip models
  logic [13:0] dac_code [NC];
  int dac_loads [NC], dac_bad [NC];
  for (genvar c = 0; c < NC; c++) begin : g_dac
    serial_dac_model #(.BITS(14)) u_dac (.en(rst_n), .sclk(dac_sclk[c]), .din(dac_din[c]), .cs_n(dac_cs_n[c]),
                                         .code(dac_code[c]), .loads(dac_loads[c]), .bad_frames(dac_bad[c]));
  end
  // memory cells of chip 0: pointer cleared by RESET on a CLK rise, else advanced
  logic [13:0] cell0 [N_PARAMS];
  int ptr0 = 0, n_rounds = 0;
  logic prev_mc_clk0 = 0;
  always @(posedge clk) if (rst_n) begin
    if (mc_clk[0] && !prev_mc_clk0) ptr0 = !mc_reset_n[0] ? 0 : (ptr0 + 1) % N_PARAMS;
    prev_mc_clk0 = mc_clk[0];
    if (!mc_enable_n[0]) cell0[ptr0] <= dac_code[0];
    if (refresh_round[0]) n_rounds++;
  end
  // topology receiver of chip 2
  logic [13:0] topo_sh, topo_got [$];
  always @(posedge topo_clk[2]) topo_sh = {topo_sh[12:0], topo_data[2]};
  always @(posedge topo_valid[2]) topo_got.push_back(topo_sh);
  int n_topo = 0;
  always @(posedge clk) if (rst_n && topo_done[2]) n_topo++;

  // ---------------------------------------------------------------- activity counters
  int n_exc = 0, n_inh = 0, n_stdp = 0, n_merge = 0, n_exc1 = 0, n_inh1 = 0, n_pat4 = 0;
  logic [NN-1:0] prev_exc = '0, prev_inh = '0;
  always @(posedge clk) if (rst_n) begin
    n_exc += $countones(syn_exc & ~prev_exc);
    n_inh += $countones(syn_inh & ~prev_inh);
    if (syn_exc[1] && !prev_exc[1]) n_exc1++;
    if (syn_exc[4] && !prev_exc[4]) n_pat4++;
    if (syn_inh[1] && !prev_inh[1]) n_inh1++;
    prev_exc = syn_exc; prev_inh = syn_inh;
    if (stdp_event) n_stdp++;
    if (stdp_merged) n_merge++;
  end

  task automatic pulse(input logic [NN-1:0] v);
    spike_pad = v; repeat (20) @(posedge clk); spike_pad = '0; repeat (5) @(posedge clk);
  endtask

  initial begin
    #2000000000;
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] pv [5] = '{14'h0123, 14'h3FFF, 14'h2AAA, 14'h1555, 14'h0001};
  logic [13:0] tw [3] = '{14'h2B3C, 14'h0F0F, 14'h3001};

  initial begin
    int w01, w10, w21, w31, w_before, cyc;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // ---- configuration
    cmd('{CMD_BOUNDS, 8'h03, 8'hE8, 8'h00, 8'h14});           // W_LTP = 1000, W_LTD = 20
    cmd('{CMD_WRITE_SYN, 8'd0, 8'd1, 8'h80, 8'd200});         // 0 -> 1 plastic, 200
    cmd('{CMD_WRITE_SYN, 8'd1, 8'd0, 8'h80, 8'd200});         // 1 -> 0 plastic, 200
    cmd('{CMD_WRITE_SYN, 8'd2, 8'd1, 8'h00, 8'd30});          // 2 -> 1 fixed, 30
    cmd('{CMD_WRITE_SYN, 8'd3, 8'd1, 8'h81, 8'h2C});          // 3 -> 1 plastic, 300
    cmd('{CMD_SET_INHIB, 8'd2, 8'd1});
    for (int a = 0; a < N_PARAMS; a++)
      if (a < 5 || a == N_PARAMS - 1)
        cmd('{CMD_WRITE_PARAM, 8'd0, 8'(a), 8'(pv[a % 5] >> 8), 8'(pv[a % 5])});
    for (int w = 0; w < 3; w++)
      cmd('{CMD_WRITE_TOPO, 8'd2, 8'(w), 8'(tw[w] >> 8), 8'(tw[w])});
    cmd('{CMD_START_TOPO, 8'd2});
    cmd('{CMD_REFRESH_EN, 8'd1});
    read_w(0, 1, w_before);
    check(w_before == 200, $sformatf("configured weight read back %0d", w_before));
    // ---- topology words
    while (n_topo == 0) @(posedge clk);
    check(topo_got.size() == 3, $sformatf("%0d topology words", topo_got.size()));
    for (int w = 0; w < 3 && w < topo_got.size(); w++)
      check(topo_got[w] == tw[w], $sformatf("topology word %0d %h", w, topo_got[w]));
    // ---- parameter refresh: two full rounds
    begin
      automatic int r0 = n_rounds;
      while (n_rounds < r0 + 2) @(posedge clk);
    end
    for (int a = 0; a < 5; a++)
      check(cell0[a] == pv[a], $sformatf("chip 0 cell %0d = %h", a, cell0[a]));
    check(cell0[N_PARAMS - 1] == pv[(N_PARAMS - 1) % 5], "chip 0 last cell");
    check(dac_bad[0] == 0 && dac_bad[4] == 0, $sformatf("clean DAC frames (%0d, %0d bad)", dac_bad[0], dac_bad[4]));
    check(dac_loads[3] >= N_PARAMS, "every chip refreshed");
    // ---- predefined stimulation: neuron 4 every 1 ms for about 4 ms, then off
    cmd('{CMD_PATTERN, 8'd4, 8'd0, 8'd1, 8'h80, 8'd5});
    repeat (4 * (CLK_HZ / 1000) + 100) @(posedge clk);
    cmd('{CMD_PATTERN, 8'd4, 8'd0, 8'd1, 8'h00, 8'd5});
    begin
      automatic int p0 = n_pat4;
      check(p0 >= 3 && p0 <= 6, $sformatf("pattern triggers on neuron 4: %0d", p0));
      repeat (3 * (CLK_HZ / 1000)) @(posedge clk);
      check(n_pat4 == p0, "pattern stopped");
    end
    // ---- spikes: 0 then 1 (LTP on 0->1, LTD on 1->0), 2 (inhibitory), 3 then 1
    pulse(25'h1);
    repeat (800) @(posedge clk);
    pulse(25'h2);
    repeat (200) @(posedge clk);
    pulse(25'h4);
    repeat (200) @(posedge clk);
    pulse(25'h8);
    repeat (800) @(posedge clk);
    pulse(25'h2);
    repeat (200) @(posedge clk);
    read_w(0, 1, w01);
    read_w(1, 0, w10);
    read_w(2, 1, w21);
    read_w(3, 1, w31);
    check(w01 > 200 && w01 <= 1000, $sformatf("LTP: w 0->1 = %0d", w01));
    check(w10 < 200 && w10 >= 20, $sformatf("LTD: w 1->0 = %0d", w10));
    check(w21 == 30, $sformatf("fixed synapse unchanged: %0d", w21));
    // neuron 1 fired shortly before neuron 3 (strong LTD of 3->1), and its
    // next spike comes soon after its previous one, so its efficacy and the
    // LTP it brings are small: the net change is a depression
    check(w31 < 300 && w31 >= 20, $sformatf("LTD then weak LTP: w 3->1 = %0d", w31));
    check(n_exc1 >= 2, $sformatf("excitatory triggers on neuron 1: %0d", n_exc1));
    check(n_inh1 == 1, $sformatf("inhibitory triggers on neuron 1: %0d", n_inh1));
    // spike reports
    while (n_spike_frames < 5) @(posedge clk);
    check(spike_n.size() >= 5 && spike_n[0] == 0 && spike_n[1] == 1 && spike_n[2] == 2 &&
          spike_n[3] == 3 && spike_n[4] == 1, "spike report order");
    if (spike_t.size() >= 2)
      check(spike_t[1] - spike_t[0] >= longint'((800 + 25) / (CLK_HZ / 1_000_000)) - 2 &&
            spike_t[1] - spike_t[0] <= longint'((800 + 25) / (CLK_HZ / 1_000_000)) + 2,
            $sformatf("time stamp difference %0d us", spike_t[1] - spike_t[0]));
    // ---- all 25 neurons at once, then neuron 24 again while it is still pending
    cyc = 0;
    spike_pad = '1;
    repeat (5) @(posedge clk);
    while (!stdp_busy) @(posedge clk);
    fork
      begin repeat (60) @(posedge clk); spike_pad = '0; repeat (5) @(posedge clk);
            spike_pad[24] = 1; repeat (10) @(posedge clk); spike_pad[24] = 0; end
      while (stdp_busy) begin @(posedge clk); cyc++; end
    join
    check(cyc <= 30 * (CLK_HZ / 1_000_000) || CLK_HZ < 50_000_000,
          $sformatf("25 spikes processed in %0d clocks", cyc));
    check(cyc <= 26 * 53 + 10, $sformatf("25 spikes take %0d clocks (25 x 53 expected)", cyc));
    // ---- a second burst while the serial line is still busy: drops
    pulse('1);
    repeat (200) @(posedge clk);
    check(events_dropped > 0, $sformatf("events dropped %0d", events_dropped));
    // ---- mechanism counts
    $display("mechanisms: stdp events %0d, merges %0d, exc triggers %0d, inh triggers %0d, refresh rounds %0d, topology transfers %0d, spike frames %0d, weight frames %0d, drops %0d, pattern triggers %0d",
             n_stdp, n_merge, n_exc, n_inh, n_rounds, n_topo, n_spike_frames, n_weight_frames, events_dropped, n_pat4);
    check(n_pat4 > 0, "predefined stimulation");
    check(n_stdp > 0, "STDP events");
    check(n_merge > 0, "merged spike");
    check(n_exc > 0 && n_inh > 0, "synaptic triggers");
    check(n_rounds > 0 && n_topo > 0, "chip configuration");
    check(n_spike_frames > 0 && n_weight_frames > 0, "reports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
