// neuron_traces: the four decaying traces each neuron needs for STDP.
//   tr_p    exp(-(t - t_last)/tau_p)    potentiation window P, read when a
//                                       post-synaptic partner spikes
//   tr_q    exp(-(t - t_last)/tau_q)    depression window Q, read when a
//                                       pre-synaptic partner spikes
//   tr_pre  exp(-(t - t_last)/tau_pre)  gives the pre-synaptic efficacy
//                                       eps_j = 1 - tr_pre at the next spike
//   tr_post exp(-(t - t_last)/tau_post) gives eps_i = 1 - tr_post
// All four traces of neuron n restart at 1.0 (all ones) in the clock after
// restart[n] is high. Each is an exp_decay instance; one tick_gen per time
// constant steps every trace of that constant, every TICK_x clocks (tau/1024
// at 50 MHz by default, time constants 14.8, 33.8, 28 and 88 ms as given in
// the design description). The traces are fully replicated (4 x N_NEURONS
// generators); sharing one generator between neurons in time slots is a
// possible optimisation the description mentions without fixing a ratio.
// Before a neuron's first spike its traces are 0, so P and Q contribute
// nothing and the efficacy is 1.
module neuron_traces
  import neuro_pkg::*;
#(
  parameter int N_NEURONS = 25,
  parameter int TICK_P    = 723,
  parameter int TICK_Q    = 1650,
  parameter int TICK_PRE  = 1367,
  parameter int TICK_POST = 4297
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_NEURONS-1:0] restart,
  output trace_t               tr_p    [N_NEURONS],
  output trace_t               tr_q    [N_NEURONS],
  output trace_t               tr_pre  [N_NEURONS],
  output trace_t               tr_post [N_NEURONS]
);
  logic tick_p, tick_q, tick_pre, tick_post;

  tick_gen #(.PERIOD(TICK_P))    u_tick_p    (.clk, .rst_n, .tick(tick_p));
  tick_gen #(.PERIOD(TICK_Q))    u_tick_q    (.clk, .rst_n, .tick(tick_q));
  tick_gen #(.PERIOD(TICK_PRE))  u_tick_pre  (.clk, .rst_n, .tick(tick_pre));
  tick_gen #(.PERIOD(TICK_POST)) u_tick_post (.clk, .rst_n, .tick(tick_post));

  for (genvar n = 0; n < N_NEURONS; n++) begin : g_neuron
    exp_decay #(.N(EXP_N)) u_p (.clk, .rst_n, .init(restart[n]), .f0(TRACE_ONE),
                                .step(tick_p), .q(tr_p[n]));
    exp_decay #(.N(EXP_N)) u_q (.clk, .rst_n, .init(restart[n]), .f0(TRACE_ONE),
                                .step(tick_q), .q(tr_q[n]));
    exp_decay #(.N(EXP_N)) u_pre (.clk, .rst_n, .init(restart[n]), .f0(TRACE_ONE),
                                  .step(tick_pre), .q(tr_pre[n]));
    exp_decay #(.N(EXP_N)) u_post (.clk, .rst_n, .init(restart[n]), .f0(TRACE_ONE),
                                   .step(tick_post), .q(tr_post[n]));
  end
endmodule
