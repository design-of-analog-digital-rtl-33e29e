// tick_gen: time-step prescaler for the exponential generators.
// Gives a one-clock pulse every PERIOD clocks, i.e. the step dt = tau/1024 of
// an exponential with time constant tau. For tau = 20 ms and a 20 ns clock
// the design description gives 976 clocks, the default here. A down counter
// reloads at zero; the first tick comes PERIOD clocks after reset (a choice
// of this design).
module tick_gen #(
  parameter int PERIOD = 976
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int CW = $clog2(PERIOD + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(PERIOD - 1);
      tick <= 1'b0;
    end else begin
      tick <= (cnt == '0);
      cnt  <= (cnt == '0) ? CW'(PERIOD - 1) : cnt - 1'b1;
    end
  end
endmodule
