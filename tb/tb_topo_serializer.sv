// tb_topo_serializer: receives the chip's serial topology input the way the
// chip would (DATA sampled on CLK rising edges, word latched by VALIDATION)
// and checks the three 14-bit words, the bit count per word, the idle clock
// outside transfers, the done pulse and the transfer length 3 x 15 x 2 x HALF.
module tb_topo_serializer;
  localparam int HALF = 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done, ser_clk, ser_data, ser_valid;
  logic [13:0] words [3];
  int checks = 0, failures = 0;
  logic [13:0] got [$];
  logic [13:0] sh;
  int nbits = 0, clk_edges_idle = 0;

  topo_serializer #(.HALF(HALF)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge ser_clk) begin sh = {sh[12:0], ser_data}; nbits++; end
  always @(posedge ser_valid) begin
    check(nbits == 14, $sformatf("%0d bits before VALIDATION", nbits));
    got.push_back(sh); nbits = 0;
  end
  always @(posedge clk) if (rst_n && !busy && ser_clk) clk_edges_idle++;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, len;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      foreach (words[w]) words[w] = 14'($urandom);
      if (r == 0) begin words[0] = 14'h3FFF; words[1] = 14'h0001; words[2] = 14'h2AAA; end
      repeat (5) @(negedge clk);
      got.delete();
      start = 1; @(negedge clk); start = 0;
      t0 = 0;
      while (!done) begin @(negedge clk); t0++; end
      len = t0 + 1;
      check(len == 3 * 15 * 2 * HALF + 1,  // + 1 clock to accept start
            $sformatf("transfer length %0d", len));
      check(got.size() == 3, $sformatf("%0d words received", got.size()));
      for (int w = 0; w < 3 && w < got.size(); w++)
        check(got[w] == words[w], $sformatf("word %0d got %h exp %h", w, got[w], words[w]));
      check(!busy && !ser_clk && !ser_valid, "idle after done");
    end
    check(clk_edges_idle == 0, "serial clock stopped outside transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
