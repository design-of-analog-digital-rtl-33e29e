// tb_stdp_engine: drives the STDP engine with random plasticity/weight
// matrices and random trace values, and compares every weight after each
// burst of spikes with a reference model of the soft-bounded STDP rule with
// efficacies (lowest neuron served first, LTP over the column then LTD over
// the row, traces of the spiking neuron restarted to 1.0 afterwards). Also
// checks: plastic-only writes, the direction of LTP and LTD, the bounds, one
// restart per served spike, merging of a repeated spike, and that 25
// simultaneous spikes are finished within 30 us (1500 clocks at 50 MHz).
module tb_stdp_engine;
  import neuro_pkg::*;
  localparam int NN = 25;
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] spike = '0;
  logic p_mat [NN][NN];
  weight_t w_mat [NN][NN];
  trace_t tr_p [NN], tr_q [NN], tr_pre [NN], tr_post [NN];
  weight_t w_ltp = 10'd900, w_ltd = 10'd50;
  logic upd_we, event_done, merged, busy;
  logic [4:0] upd_row, upd_col;
  weight_t upd_weight;
  logic [NN-1:0] restart;
  int checks = 0, failures = 0;

  // reference state
  int m_w [NN][NN];
  int m_tr_p [NN], m_tr_q [NN], m_tr_pre [NN], m_tr_post [NN];
  int m_eps_pre [NN], m_eps_post [NN];
  int n_ltp_up = 0, n_ltd_down = 0, n_restart = 0, n_merged = 0;

  stdp_engine #(.N_NEURONS(NN)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // the matrix and the traces, as the rest of the design would update them
  always @(posedge clk) if (rst_n) begin
    if (upd_we) begin
      if (!p_mat[upd_row][upd_col]) begin
        checks++; failures++; $display("FAIL write to non-plastic synapse");
      end
      if (upd_weight > w_mat[upd_row][upd_col]) n_ltp_up++;
      if (upd_weight < w_mat[upd_row][upd_col]) n_ltd_down++;
      w_mat[upd_row][upd_col] <= upd_weight;
    end
    for (int n = 0; n < NN; n++)
      if (restart[n]) begin
        tr_p[n] <= '1; tr_q[n] <= '1; tr_pre[n] <= '1; tr_post[n] <= '1;
        n_restart++;
      end
    if (merged) n_merged++;
  end

  function automatic int frac(input int v);  // top 12 of 20 bits
    return v >> 8;
  endfunction

  task automatic model_event(input int n);
    int g;
    m_eps_pre[n]  = 4095 - frac(m_tr_pre[n]);
    m_eps_post[n] = 4095 - frac(m_tr_post[n]);
    for (int j = 0; j < NN; j++)
      if (p_mat[j][n]) begin
        g = (((m_eps_post[n] * m_eps_pre[j]) >> 12) * frac(m_tr_p[j])) >> 12;
        if (m_w[j][n] < w_ltp) m_w[j][n] += ((w_ltp - m_w[j][n]) * g) >> 12;
      end
    for (int i = 0; i < NN; i++)
      if (p_mat[n][i]) begin
        g = (((m_eps_pre[n] * m_eps_post[i]) >> 12) * frac(m_tr_q[i])) >> 12;
        if (m_w[n][i] > w_ltd) m_w[n][i] -= ((m_w[n][i] - w_ltd) * g) >> 12;
      end
    m_tr_p[n] = 20'hFFFFF; m_tr_q[n] = 20'hFFFFF; m_tr_pre[n] = 20'hFFFFF; m_tr_post[n] = 20'hFFFFF;
  endtask

  task automatic compare(input string tag);
    int bad = 0;
    for (int j = 0; j < NN; j++)
      for (int i = 0; i < NN; i++)
        if (int'(w_mat[j][i]) != m_w[j][i]) begin
          if (bad < 3) $display("  w[%0d][%0d] = %0d, model %0d", j, i, w_mat[j][i], m_w[j][i]);
          bad++;
        end
    check(bad == 0, $sformatf("%s: %0d weights differ", tag, bad));
  endtask

  task automatic fire(input logic [NN-1:0] v, output int cycles);
    int c = 0;
    @(negedge clk); spike = v; @(negedge clk); spike = '0;
    while (busy) begin @(negedge clk); c++; end
    cycles = c + 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < NN; n++) if (v[n]) model_event(n);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int j = 0; j < NN; j++) begin
      tr_p[j] = trace_t'($urandom); tr_q[j] = trace_t'($urandom);
      tr_pre[j] = trace_t'($urandom); tr_post[j] = trace_t'($urandom);
      m_tr_p[j] = int'(tr_p[j]); m_tr_q[j] = int'(tr_q[j]);
      m_tr_pre[j] = int'(tr_pre[j]); m_tr_post[j] = int'(tr_post[j]);
      m_eps_pre[j] = 4095; m_eps_post[j] = 4095;
      for (int i = 0; i < NN; i++) begin
        p_mat[j][i] = ($urandom % 3) != 0;
        w_mat[j][i] = weight_t'($urandom % 1024);
        m_w[j][i] = int'(w_mat[j][i]);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // single events
    fire(25'(1) << 3, cyc);  compare("neuron 3");
    check(cyc == 2 * NN + 4, $sformatf("one event takes %0d clocks", cyc));  // 1 clock to latch + 53
    fire(25'(1) << 17, cyc); compare("neuron 17");
    fire(25'(1) << 3, cyc);  compare("neuron 3 again");
    // random bursts
    for (int t = 0; t < 8; t++) begin
      logic [NN-1:0] v;
      v = NN'($urandom) & NN'($urandom);
      for (int j = 0; j < NN; j++) begin   // decay the traces a little between bursts
        tr_p[j] = tr_p[j] - (tr_p[j] >> 3); tr_q[j] = tr_q[j] - (tr_q[j] >> 4);
        tr_pre[j] = tr_pre[j] - (tr_pre[j] >> 5); tr_post[j] = tr_post[j] - (tr_post[j] >> 6);
        m_tr_p[j] = int'(tr_p[j]); m_tr_q[j] = int'(tr_q[j]);
        m_tr_pre[j] = int'(tr_pre[j]); m_tr_post[j] = int'(tr_post[j]);
      end
      fire(v, cyc); compare($sformatf("burst %0d", t));
    end
    // all 25 neurons at once: within the 30 us event period
    fire('1, cyc); compare("all neurons");
    check(cyc <= 1500, $sformatf("25 events in %0d clocks (limit 1500)", cyc));
    check(cyc == NN * (2 * NN + 3) + 1, $sformatf("25 events take 1 + 25 x 53 clocks, got %0d", cyc));
    // bounds
    begin
      int bad = 0;
      for (int j = 0; j < NN; j++) for (int i = 0; i < NN; i++)
        if (p_mat[j][i] && m_w[j][i] >= 50 && m_w[j][i] <= 900 &&
            (w_mat[j][i] < w_ltd || w_mat[j][i] > w_ltp)) bad++;
      check(bad == 0, "weights inside the soft bounds");
    end
    // a repeated spike of a pending neuron merges
    @(negedge clk); spike = 25'h3; @(negedge clk); spike = 25'h2; @(negedge clk); spike = '0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    model_event(0); model_event(1);
    compare("merge");
    check(n_merged == 1, $sformatf("merged count %0d", n_merged));
    check(n_ltp_up > 0 && n_ltd_down > 0, $sformatf("LTP ups %0d, LTD downs %0d", n_ltp_up, n_ltd_down));
    check(n_restart == n_spikes - n_merged, $sformatf("restarts %0d", n_restart));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_spikes = 0;
  always @(posedge clk) if (rst_n) n_spikes += $countones(spike);
endmodule
