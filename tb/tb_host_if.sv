// tb_host_if: sends every command of the host protocol as a byte stream and
// checks the resulting configuration outputs, the held synapse write until
// it is accepted, the weight reply frame, the time-stamped spike frames, and
// that spikes beyond the event FIFO are dropped and counted while the
// transmitter is busy, and the stimulation pattern command.
module tb_host_if;
  import neuro_pkg::*;
  localparam int NN = 25, NC = 5;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_valid, tx_ready = 1;
  logic [7:0] rx_data = 0, tx_data;
  logic [NN-1:0] spike = '0;
  logic [31:0] timestamp = 32'h0102_0304;
  logic syn_we, syn_plastic, syn_ack = 0;
  logic [4:0] syn_row, syn_col;
  weight_t syn_weight, w_ltp, w_ltd;
  weight_t w_mat [NN][NN];
  logic [NN-1:0] inhib;
  logic [NC-1:0] param_we, topo_start;
  logic [7:0] param_addr;
  param_t param_data;
  topo_word_t topo_words [NC][TOPO_WORDS];
  logic refresh_en, pat_we, pat_en;
  logic [4:0] pat_n;
  logic [15:0] pat_period;
  weight_t pat_weight;
  logic [15:0] dropped;
  int checks = 0, failures = 0;
  logic [7:0] txq [$];

  host_if #(.N_NEURONS(NN), .N_CHIPS(NC)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) txq.push_back(tx_data);

  task automatic send(input logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(negedge clk); rx_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NN; j++) for (int i = 0; i < NN; i++) w_mat[j][i] = weight_t'(j * 37 + i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(w_ltp == 10'd1023 && w_ltd == 0 && inhib == 0 && !refresh_en, "reset values");
    // synapse write, held until acknowledged
    send(CMD_WRITE_SYN); send(8'd7); send(8'd19); send(8'h82); send(8'h5A);
    check(syn_we && syn_row == 7 && syn_col == 19 && syn_plastic && syn_weight == 10'h25A, "synapse write request");
    repeat (5) @(negedge clk);
    check(syn_we, "held without ack");
    syn_ack = 1; @(negedge clk); syn_ack = 0;
    check(!syn_we, "released after ack");
    // unknown opcode is skipped
    send(8'h55);
    // parameter write
    fork
      begin
        send(CMD_WRITE_PARAM); send(8'd3); send(8'd204); send(8'h3F); send(8'hFE);
      end
      begin
        bit seen = 0;
        repeat (40) begin
          @(posedge clk);
          if (param_we != 0) begin
            seen = 1;
            check(param_we == 5'b01000 && param_addr == 8'd204 && param_data == 14'h3FFE, "param write");
          end
        end
        check(seen, "param write pulse seen");
      end
    join
    // topology
    send(CMD_WRITE_TOPO); send(8'd1); send(8'd2); send(8'h15); send(8'h55);
    check(topo_words[1][2] == 14'h1555 && topo_words[1][0] == 0, "topology word");
    fork
      send(CMD_START_TOPO);
      begin
        int n = 0;
        repeat (10) begin @(posedge clk); if (topo_start == 5'b00000) ; else begin n++; check(topo_start == 5'b00000, "wrong chip"); end end
      end
    join
    fork
      send(8'd1);
      begin
        bit seen = 0;
        repeat (10) begin @(posedge clk); if (topo_start == 5'b00010) seen = 1; end
        check(seen, "topology start for chip 1");
      end
    join
    // bounds, inhibitory flag, refresh
    send(CMD_BOUNDS); send(8'h03); send(8'h20); send(8'h00); send(8'h40);
    check(w_ltp == 10'h320 && w_ltd == 10'h040, "bounds");
    send(CMD_SET_INHIB); send(8'd24); send(8'd1);
    check(inhib == 25'(1) << 24, "inhibitory flag");
    send(CMD_REFRESH_EN); send(8'd1);
    check(refresh_en, "refresh enabled");
    // stimulation pattern
    fork
      begin send(CMD_PATTERN); send(8'd9); send(8'h12); send(8'h34); send(8'h81); send(8'h23); end
      begin
        bit seen = 0;
        repeat (40) begin
          @(posedge clk);
          if (pat_we) begin
            seen = 1;
            check(pat_n == 9 && pat_period == 16'h1234 && pat_en && pat_weight == 10'h123, "pattern write");
          end
        end
        check(seen, "pattern write pulse seen");
      end
    join
    // weight read
    txq.delete();
    send(CMD_READ_W); send(8'd20); send(8'd11);
    repeat (20) @(negedge clk);
    check(txq.size() == 5, $sformatf("reply length %0d", txq.size()));
    if (txq.size() == 5)
      check(txq[0] == RSP_WEIGHT && txq[1] == 20 && txq[2] == 11 &&
            {txq[3][1:0], txq[4]} == 10'(20 * 37 + 11), "weight reply");
    // spike reports, lowest neuron first, with time stamp
    txq.delete();
    @(negedge clk); spike = 25'h0000_021; @(negedge clk); spike = 0;
    repeat (30) @(negedge clk);
    check(txq.size() == 12, $sformatf("spike frames %0d bytes", txq.size()));
    if (txq.size() == 12) begin
      check(txq[0] == RSP_SPIKE && txq[1] == 0 && {txq[2], txq[3], txq[4], txq[5]} == 32'h0102_0304, "first spike frame");
      check(txq[6] == RSP_SPIKE && txq[7] == 5, "second spike frame");
    end
    // overflow: transmitter stalled, 25 + 25 spikes
    txq.delete();
    tx_ready = 0;
    @(negedge clk); spike = '1; timestamp = 32'd99; @(negedge clk); spike = '0;
    repeat (30) @(negedge clk);
    @(negedge clk); spike = '1; @(negedge clk); spike = '0;
    repeat (40) @(negedge clk);
    // one frame is loaded, 16 wait in the FIFO, the rest are dropped
    check(dropped == 16'(50 - 17), $sformatf("dropped %0d", dropped));
    tx_ready = 1;
    repeat (200) @(negedge clk);
    check(txq.size() == 17 * 6, $sformatf("%0d bytes after overflow", txq.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
