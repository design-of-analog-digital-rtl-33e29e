// topo_serializer: topology configuration of one analog chip.
// The switch matrix that groups the chip's conductance modules into neurons
// is set by N_WORDS = 3 words of WORD_BITS = 14 bits sent to the chip's
// serial input (CLK, DATA, VALIDATION). The serial clock runs at 100 kHz
// (HALF = 250 clocks of 50 MHz per half period) and, as the description
// requires, toggles only while a transfer is in progress, to limit coupling
// into the analog circuits. Word count, word size and clock rate follow the
// description. Framing is this design's choice: per word, 14 serial periods
// carry the bits MSB first, DATA changing at the start of the low half and
// CLK rising in the middle of the period; then one period with CLK held low
// and VALIDATION high latches the word. A transfer of 3 words takes
// 3 x 15 x 2 x HALF clocks; done pulses for one clock at its end.
// start is ignored while busy; words is sampled when start is accepted.
module topo_serializer
  import neuro_pkg::*;
#(
  parameter int WORD_BITS = 14,
  parameter int N_WORDS   = 3,
  parameter int HALF      = 250
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [WORD_BITS-1:0] words [N_WORDS],
  output logic                 busy,
  output logic                 done,
  output logic                 ser_clk,
  output logic                 ser_data,
  output logic                 ser_valid
);
  localparam int HW = $clog2(HALF + 1);
  localparam int BW = $clog2(WORD_BITS + 1);
  localparam int WW = $clog2(N_WORDS + 1);

  logic [WORD_BITS-1:0] buf_w [N_WORDS];
  logic [HW-1:0]        hcnt;
  logic                 high;      // second half of the serial period
  logic [BW-1:0]        bitn;      // 0..WORD_BITS-1 data, WORD_BITS = validation
  logic [WW-1:0]        wordn;

  always_comb begin
    ser_clk   = busy && high && (bitn != BW'(WORD_BITS));
    ser_valid = busy && (bitn == BW'(WORD_BITS));
    ser_data  = busy && (bitn != BW'(WORD_BITS)) &&
                buf_w[wordn][WORD_BITS - 1 - int'(bitn)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      hcnt  <= '0;
      high  <= 1'b0;
      bitn  <= '0;
      wordn <= '0;
      for (int w = 0; w < N_WORDS; w++) buf_w[w] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          buf_w <= words;
          hcnt  <= '0;
          high  <= 1'b0;
          bitn  <= '0;
          wordn <= '0;
        end
      end else if (hcnt != HW'(HALF - 1)) begin
        hcnt <= hcnt + 1'b1;
      end else begin
        hcnt <= '0;
        high <= !high;
        if (high) begin
          if (bitn != BW'(WORD_BITS)) begin
            bitn <= bitn + 1'b1;
          end else begin
            bitn <= '0;
            if (wordn == WW'(N_WORDS - 1)) begin
              busy  <= 1'b0;
              done  <= 1'b1;
              wordn <= '0;
            end else begin
              wordn <= wordn + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
