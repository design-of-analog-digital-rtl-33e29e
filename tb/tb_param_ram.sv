// tb_param_ram: random writes and reads of the 205 x 14-bit parameter RAM
// checked against a model, including the one-clock read latency.
module tb_param_ram;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [13:0] wdata = 0, rdata;
  logic [13:0] m [205];
  int checks = 0, failures = 0;

  param_ram dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 205; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 14'($urandom); m[a] = wdata;
    end
    @(negedge clk); we = 1; waddr = 8'd230; wdata = 14'h1555;   // out of range: ignored
    @(negedge clk); we = 0;
    for (int t = 0; t < 600; t++) begin
      logic [7:0] a;
      a = 8'($urandom % 205);
      if (($urandom % 4) == 0) begin
        we = 1; waddr = 8'($urandom % 205); wdata = 14'($urandom);
      end else we = 0;
      raddr = a;
      @(negedge clk);
      check(rdata == m[a], $sformatf("addr %0d got %0h exp %0h", a, rdata, m[a]));
      if (we) m[waddr] = wdata;
    end
    we = 0; raddr = 8'd230; @(negedge clk);
    check(rdata == 0, "out-of-range read is 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
