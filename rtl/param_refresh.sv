// param_refresh: continuous refresh of one analog chip's parameter memory.
// The chip keeps its N_PARAMS = 205 model parameters as voltages on analog
// memory cells, which leak and must be rewritten all the time. This block
// walks through the parameter RAM, one parameter per period of 2*HALF clocks
// (10 us at 50 MHz, as in the description), so a full round takes
// 205 x 10 us = 2.05 ms, matching the description's refresh of all
// parameters every 2 ms. For parameter k in a period (pc = clock in period):
//   pc = 0        raddr = k (RAM read, data valid at pc = 1)
//   pc = 2 ..     the 14-bit code is shifted MSB first into the serial DAC:
//                 dac_cs_n low, each bit DAC_DIV clocks with dac_sclk low then
//                 DAC_DIV clocks high (the DAC samples on the rising edge);
//                 dac_cs_n rises after the last bit and updates the DAC output
//   pc < HALF     mc_clk high (first half); mc_reset_n low during this half of
//                 parameter 0 only, to restart the chip's cell pointer
//   pc >= HALF    mc_enable_n low: the addressed cell samples the DAC output
// The signal names CLK, RESET, ENABLE and the 10 us parameter period follow
// the description; the order of events inside the period and the DAC's
// serial protocol are this design's choices, since the chip's and the DAC's
// protocols are not given. round_done pulses for one clock at the end of
// parameter N_PARAMS-1. While en is low every output is idle and the next
// round starts from parameter 0. Requires 2 + 2*DAC_DIV*PARAM_BITS < HALF.
module param_refresh #(
  parameter int N_PARAMS   = 205,
  parameter int PARAM_BITS = 14,
  parameter int HALF       = 250,
  parameter int DAC_DIV    = 4,
  localparam int AW = $clog2(N_PARAMS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  output logic [AW-1:0]         raddr,
  input  logic [PARAM_BITS-1:0] rdata,
  output logic                  mc_clk,
  output logic                  mc_reset_n,
  output logic                  mc_enable_n,
  output logic                  dac_sclk,
  output logic                  dac_din,
  output logic                  dac_cs_n,
  output logic                  round_done
);
  localparam int PW = $clog2(2 * HALF + 1);
  localparam int DW = $clog2(2 * DAC_DIV + 1);
  localparam int BW = $clog2(PARAM_BITS + 1);

  logic                  run;
  logic [PW-1:0]         pc;
  logic [DW-1:0]         sub;
  logic [BW-1:0]         bits_left;
  logic [PARAM_BITS-1:0] shreg;

  always_comb begin
    mc_clk      = run && (int'(pc) < HALF);
    mc_reset_n  = !(run && raddr == '0 && int'(pc) < HALF);
    mc_enable_n = !(run && int'(pc) >= HALF);
    dac_cs_n    = !(run && bits_left != '0);
    dac_sclk    = !dac_cs_n && (int'(sub) >= DAC_DIV);
    dac_din     = !dac_cs_n && shreg[PARAM_BITS-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      pc         <= '0;
      raddr      <= '0;
      sub        <= '0;
      bits_left  <= '0;
      shreg      <= '0;
      round_done <= 1'b0;
    end else begin
      round_done <= 1'b0;
      if (!en) begin
        run       <= 1'b0;
        pc        <= '0;
        raddr     <= '0;
        bits_left <= '0;
      end else begin
        run <= 1'b1;
        if (run) begin
          // Serial DAC load.
          if (pc == PW'(1)) begin
            shreg     <= rdata;
            bits_left <= BW'(PARAM_BITS);
            sub       <= '0;
          end else if (bits_left != '0) begin
            if (sub == DW'(2 * DAC_DIV - 1)) begin
              sub       <= '0;
              shreg     <= shreg << 1;
              bits_left <= bits_left - 1'b1;
            end else begin
              sub <= sub + 1'b1;
            end
          end
          // Parameter period.
          if (pc == PW'(2 * HALF - 1)) begin
            pc <= '0;
            if (raddr == AW'(N_PARAMS - 1)) begin
              raddr      <= '0;
              round_done <= 1'b1;
            end else begin
              raddr <= raddr + 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
      end
    end
  end
endmodule
