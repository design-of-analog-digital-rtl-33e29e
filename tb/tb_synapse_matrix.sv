// tb_synapse_matrix: random configuration writes checked against a model of
// both matrices, STDP writes, and the priority of an STDP write over a
// configuration write in the same clock.
module tb_synapse_matrix;
  import neuro_pkg::*;
  localparam int NN = 25;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_plastic = 0, host_ack, upd_we = 0;
  logic [4:0] host_row = 0, host_col = 0, upd_row = 0, upd_col = 0;
  weight_t host_weight = 0, upd_weight = 0;
  logic p_mat [NN][NN];
  weight_t w_mat [NN][NN];
  logic m_p [NN][NN];
  weight_t m_w [NN][NN];
  int checks = 0, failures = 0;

  synapse_matrix #(.N_NEURONS(NN)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic compare();
    int bad = 0;
    for (int j = 0; j < NN; j++)
      for (int i = 0; i < NN; i++)
        if (p_mat[j][i] != m_p[j][i] || w_mat[j][i] != m_w[j][i]) bad++;
    check(bad == 0, $sformatf("%0d cells differ", bad));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NN; j++) for (int i = 0; i < NN; i++) begin m_p[j][i] = 0; m_w[j][i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int t = 0; t < 400; t++) begin
      host_we = ($urandom % 2) == 0;
      host_row = 5'($urandom % NN); host_col = 5'($urandom % NN);
      host_plastic = 1'($urandom); host_weight = weight_t'($urandom);
      upd_we = ($urandom % 3) == 0;
      upd_row = 5'($urandom % NN); upd_col = 5'($urandom % NN); upd_weight = weight_t'($urandom);
      #1;
      if (host_we) check(host_ack == !upd_we, "host_ack");
      if (upd_we) m_w[upd_row][upd_col] = upd_weight;
      else if (host_we) begin
        m_w[host_row][host_col] = host_weight;
        m_p[host_row][host_col] = host_plastic;
      end
      @(negedge clk);
      if (t % 20 == 19) compare();
    end
    host_we = 0; upd_we = 0;
    @(negedge clk);
    compare();
    rst_n = 0; #1 rst_n = 1;
    for (int j = 0; j < NN; j++) for (int i = 0; i < NN; i++) begin m_p[j][i] = 0; m_w[j][i] = 0; end
    @(negedge clk);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
