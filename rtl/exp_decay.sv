// exp_decay: first-order exponential generator.
// A 2N-bit register Q is either loaded with the initial value f0 (init) or,
// on each time step (step), replaced by Q - Q/2^N, where the division is a
// right shift by N bits. Each step therefore multiplies the value by
// (1 - 2^-N) ~= exp(-dt/tau) with dt = tau/2^N, so a step rate of 2^N/tau
// gives exp(-t/tau). The structure (multiplexer on f0/init, 2N-bit register,
// 2N-bit subtractor A - B) and the 20-bit / N = 10 sizes follow the design
// description; the subtrahend is the register shifted right by N, as the
// description's text states. Using a step enable on the system clock rather
// than a separate slow clock, and clearing to 0 on reset, are this design's
// choices.
// Timing: q changes on the clock edge where init or step is high; init wins.
module exp_decay #(
  parameter int N = 10
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic [2*N-1:0] f0,
  input  logic           step,
  output logic [2*N-1:0] q
);
  logic [2*N-1:0] a_minus_b;

  always_comb a_minus_b = q - {{N{1'b0}}, q[2*N-1:N]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (init) q <= f0;
    else if (step) q <= a_minus_b;
  end
endmodule
