// tb_param_refresh: runs the refresh controller against a parameter RAM and
// a serial DAC model and plays the chip's memory-cell logic: a cell pointer
// cleared while RESET is low and advanced on each CLK rising edge after the
// first; while ENABLE is low the addressed cell takes the DAC code. Checks
// every cell against the RAM after two rounds, the per-parameter period of
// 2*HALF clocks, the round length N_PARAMS x 2*HALF, clean DAC frames, and
// that the outputs stay idle while the refresh is disabled.
module tb_param_refresh;
  localparam int NP = 9, HALF = 60, DIV = 2;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] raddr;
  logic [13:0] rdata;
  logic mc_clk, mc_reset_n, mc_enable_n, dac_sclk, dac_din, dac_cs_n, round_done;
  logic [13:0] code;
  int loads, bad_frames;
  logic [13:0] ram [NP];
  logic [13:0] mcell [NP];
  int ptr = 0, checks = 0, failures = 0, cyc = 0, last_round = -1, rounds = 0;
  int last_clk_rise = -1;

  param_refresh #(.N_PARAMS(NP), .HALF(HALF), .DAC_DIV(DIV)) dut (.*);
  serial_dac_model #(.BITS(14)) dac (.en(rst_n), .sclk(dac_sclk), .din(dac_din), .cs_n(dac_cs_n),
                                     .code, .loads, .bad_frames);
  always #5 clk = ~clk;

  // parameter RAM with one-clock read
  always @(posedge clk) rdata <= ram[raddr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // chip memory-cell logic, sampled on the system clock: on each CLK rising
  // edge the pointer is cleared if RESET is low, else advanced
  logic prev_mc_clk = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mc_clk && !prev_mc_clk) begin
      ptr = !mc_reset_n ? 0 : (ptr + 1) % NP;
      if (last_clk_rise >= 0)
        check(cyc - last_clk_rise == 2 * HALF, $sformatf("CLK period %0d", cyc - last_clk_rise));
      last_clk_rise = cyc;
    end
    prev_mc_clk = mc_clk;
    if (!mc_enable_n) mcell[ptr] <= code;
    if (round_done) begin
      if (last_round >= 0)
        check(cyc - last_round == NP * 2 * HALF, $sformatf("round length %0d", cyc - last_round));
      last_round = cyc; rounds++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ram[a]) ram[a] = 14'($urandom);
    foreach (mcell[a]) mcell[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    check(mc_clk == 0 && mc_enable_n && mc_reset_n && dac_cs_n, "idle while disabled");
    check(loads == 0, "no DAC load while disabled");
    en = 1;
    while (rounds < 3) @(negedge clk);
    for (int a = 0; a < NP; a++)
      check(mcell[a] == ram[a], $sformatf("cell %0d = %h, RAM %h", a, mcell[a], ram[a]));
    check(bad_frames == 0, $sformatf("%0d bad DAC frames", bad_frames));
    check(loads >= 3 * NP, $sformatf("%0d DAC loads", loads));
    // change the RAM: the next round carries the new values
    foreach (ram[a]) ram[a] = 14'($urandom);
    while (rounds < 5) @(negedge clk);
    for (int a = 0; a < NP; a++)
      check(mcell[a] == ram[a], $sformatf("updated cell %0d = %h, RAM %h", a, mcell[a], ram[a]));
    en = 0;
    repeat (3) @(negedge clk);
    check(mc_clk == 0 && mc_enable_n && dac_cs_n, "idle after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
