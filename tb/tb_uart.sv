// tb_uart: the transmitter's line is decoded by sampling in the middle of
// each bit (independent of the receiver) and also looped into the receiver;
// both must give back every random byte. A byte sent by the testbench with a
// bad stop bit must be dropped by the receiver.
module tb_uart;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, txd, rx_valid, line;
  logic [7:0] tx_data = 0, rx_data;
  logic use_tb_line = 0, tb_line = 1;
  int checks = 0, failures = 0;
  logic [7:0] sent [$], got_rx [$], got_line [$];

  uart_tx #(.CLK_DIV(DIV)) u_tx (.clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd);
  uart_rx #(.CLK_DIV(DIV)) u_rx (.clk, .rst_n, .rxd(line), .valid(rx_valid), .data(rx_data));
  assign line = use_tb_line ? tb_line : txd;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && rx_valid) got_rx.push_back(rx_data);

  // line decoder
  initial begin
    logic [7:0] b;
    @(posedge rst_n);
    forever begin
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      if (txd) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      check(txd == 1, "stop bit");
      got_line.push_back(b);
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(txd == 1 && tx_ready, "idle line high, ready");
    for (int t = 0; t < 40; t++) begin
      tx_data = 8'($urandom); tx_valid = 1;
      if (t == 0) tx_data = 8'h00;
      if (t == 1) tx_data = 8'hFF;
      sent.push_back(tx_data);
      while (!tx_ready) @(negedge clk);
      @(negedge clk);           // accepted at this clock edge
      tx_valid = 0;
      while (!tx_ready) @(negedge clk);
      if ($urandom % 2) repeat ($urandom % 30) @(negedge clk);
    end
    tx_valid = 0;
    repeat (20 * DIV) @(negedge clk);
    check(got_rx.size() == sent.size(), $sformatf("received %0d of %0d", got_rx.size(), sent.size()));
    check(got_line.size() == sent.size(), $sformatf("decoded %0d of %0d", got_line.size(), sent.size()));
    for (int i = 0; i < sent.size() && i < got_rx.size() && i < got_line.size(); i++) begin
      check(got_rx[i] == sent[i], $sformatf("rx byte %0d %h exp %h", i, got_rx[i], sent[i]));
      check(got_line[i] == sent[i], $sformatf("line byte %0d %h exp %h", i, got_line[i], sent[i]));
    end
    // framing error
    use_tb_line = 1;
    begin
      int n0;
      logic [9:0] f;
      n0 = got_rx.size();
      f = {1'b0, 8'hA5, 1'b0};   // stop bit 0
      for (int i = 0; i < 10; i++) begin tb_line = f[i]; repeat (DIV) @(negedge clk); end
      tb_line = 1; repeat (4 * DIV) @(negedge clk);
      check(got_rx.size() == n0, "bad stop bit dropped");
      f = {1'b1, 8'h3C, 1'b0};
      for (int i = 0; i < 10; i++) begin tb_line = f[i]; repeat (DIV) @(negedge clk); end
      repeat (2 * DIV) @(negedge clk);
      check(got_rx.size() == n0 + 1 && got_rx[n0] == 8'h3C, "good frame after bad one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
