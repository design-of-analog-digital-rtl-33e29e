// tb_syn_stim: checks the synaptic triggers. A spike of neuron j must raise
// the excitatory (or, for an inhibitory j, the inhibitory) trigger of each
// neuron i with w_ji != 0 for between (w-1)*SCALE+1 and w*SCALE clocks,
// leave unconnected neurons quiet, and add the widths of spikes that overlap.
// A predefined stimulation event on neuron i must add stim_w[i] * SCALE
// clocks to its excitatory trigger, alone and together with a spike.
module tb_syn_stim;
  import neuro_pkg::*;
  localparam int NN = 4, S = 3;
  logic clk = 0, rst_n = 0;
  logic [NN-1:0] spike = '0, inhib = 4'b0010, syn_exc, syn_inh;
  weight_t w_mat [NN][NN];
  logic [NN-1:0] stim = '0;
  weight_t stim_w [NN] = '{10'd3, 10'd0, 10'd0, 10'd6};
  int checks = 0, failures = 0;
  int hi_exc [NN], hi_inh [NN];

  syn_stim #(.N_NEURONS(NN), .SCALE(S)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NN; i++) begin
      hi_exc[i] += int'(syn_exc[i]);
      hi_inh[i] += int'(syn_inh[i]);
    end

  task automatic clear();
    for (int i = 0; i < NN; i++) begin hi_exc[i] = 0; hi_inh[i] = 0; end
  endtask

  function automatic bit width_ok(input int got, input int w);
    return got >= (w - 1) * S + 1 && got <= w * S;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NN; j++) for (int i = 0; i < NN; i++) w_mat[j][i] = '0;
    w_mat[0][1] = 10'd5; w_mat[0][2] = 10'd2; w_mat[1][3] = 10'd4; w_mat[2][0] = 10'd7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(syn_exc == 0 && syn_inh == 0, "quiet after reset");
    clear();
    spike = 4'b0001; @(negedge clk); spike = 0;
    repeat (40) @(negedge clk);
    check(width_ok(hi_exc[1], 5), $sformatf("exc 0->1 width %0d", hi_exc[1]));
    check(width_ok(hi_exc[2], 2), $sformatf("exc 0->2 width %0d", hi_exc[2]));
    check(hi_exc[0] == 0 && hi_exc[3] == 0 && hi_inh.sum() == 0, "no other triggers");
    clear();
    spike = 4'b0010; @(negedge clk); spike = 0;
    repeat (40) @(negedge clk);
    check(width_ok(hi_inh[3], 4), $sformatf("inh 1->3 width %0d", hi_inh[3]));
    check(hi_exc.sum() == 0, "inhibitory neuron gives no excitation");
    // simultaneous spikes of 0 and 2, then 0 again: widths add
    clear();
    spike = 4'b0101; @(negedge clk); spike = 0; @(negedge clk);
    spike = 4'b0001; @(negedge clk); spike = 0;
    repeat (60) @(negedge clk);
    check(hi_exc[1] >= 10 * S - 2 * S && hi_exc[1] <= 10 * S, $sformatf("accumulated 0->1 width %0d", hi_exc[1]));
    check(width_ok(hi_exc[0], 7), $sformatf("exc 2->0 width %0d", hi_exc[0]));
    // trigger rises two clocks after the spike
    clear();
    @(negedge clk); spike = 4'b0100; @(negedge clk); spike = 0;
    check(!syn_exc[0], "not yet high after one clock");
    @(negedge clk);
    check(syn_exc[0], "high two clocks after the spike");
    // predefined stimulation
    repeat (40) @(negedge clk);
    clear();
    stim = 4'b1000; @(negedge clk); stim = 0;
    repeat (40) @(negedge clk);
    check(width_ok(hi_exc[3], 6), $sformatf("stimulation of 3 width %0d", hi_exc[3]));
    check(hi_exc[0] == 0 && hi_exc[1] == 0 && hi_exc[2] == 0 && hi_inh.sum() == 0, "stimulation only on 3");
    clear();
    spike = 4'b0100; stim = 4'b0001; @(negedge clk); spike = 0; stim = 0;
    repeat (60) @(negedge clk);
    check(hi_exc[0] >= 10 * S - 2 * S && hi_exc[0] <= 10 * S, $sformatf("stimulation + spike on 0 width %0d", hi_exc[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
