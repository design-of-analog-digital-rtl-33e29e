// spike_input: capture of the analog neurons' spike-detection outputs.
// Each analog neuron drives one FPGA pin with its 1-bit spike signal. The
// pins are asynchronous to the FPGA clock, so each goes through a two-flop
// synchroniser; a rising edge then gives a one-clock pulse on spike[n], three
// clocks after the pin rose. A free-running time stamp counts microseconds
// (US_DIV clocks each, 50 at 50 MHz) in 32 bits and is what the host link
// reports with each spike. Synchroniser depth, edge detection and the time
// stamp format are this design's choices.
module spike_input #(
  parameter int N_NEURONS = 25,
  parameter int US_DIV    = 50
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_NEURONS-1:0] spike_pad,
  output logic [N_NEURONS-1:0] spike,
  output logic [31:0]          timestamp
);
  localparam int DW = $clog2(US_DIV + 1);
  logic [N_NEURONS-1:0] s1, s2, s3;
  logic [DW-1:0]        div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      s3        <= '0;
      spike     <= '0;
      div       <= '0;
      timestamp <= '0;
    end else begin
      s1    <= spike_pad;
      s2    <= s1;
      s3    <= s2;
      spike <= s2 & ~s3;
      if (div == DW'(US_DIV - 1)) begin
        div       <= '0;
        timestamp <= timestamp + 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end
endmodule
