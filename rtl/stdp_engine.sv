// stdp_engine: event-driven spike-timing-dependent plasticity.
// For every spike of neuron n the engine applies the soft-bounded STDP rule
//   LTP (n post-synaptic, every plastic j -> n):
//     w_jn += eps_n * eps_j * (W_LTP - w_jn) * P_j(t - t_j_last)
//   LTD (n pre-synaptic, every plastic n -> i):
//     w_ni -= eps_n * eps_i * (w_ni - W_LTD) * Q_i(t - t_i_last)
// where the efficacies eps = 1 - exp(-(t_last - t_last-1)/tau) capture the
// memory effect. The rule, the soft bounds and the efficacy terms follow the
// design description. At the spike, eps_pre[n] = 1 - tr_pre[n] and
// eps_post[n] = 1 - tr_post[n] are computed and kept for later events of the
// partners; then the traces of n are restarted (restart[n]).
//
// Sequencing (this design's choice): spikes are latched in a pending vector
// (a second spike of a neuron that is still pending merges with it); the
// lowest pending neuron is served as
//   IDLE (pick) -> EPS -> LTP x N_NEURONS -> LTD x N_NEURONS -> RESTART
// one synapse per clock, 2*N_NEURONS+3 = 53 clocks per spike. With 25
// neurons spiking together the last update is written 1325 clocks (26.5 us
// at 50 MHz) later, inside the 30 us event period of the design description.
// Arithmetic: the top FB bits of each 20-bit trace are a fraction (all ones
// = 1.0), products are truncated, and a weight at or past a bound is not
// moved further that way; weights therefore stay between W_LTD and W_LTP.
// Non-plastic synapses are never written.
// Outputs: upd_* is a weight write for synapse_matrix in the same clock;
// restart is a one-clock pulse; event_done pulses with it; merged pulses when
// a spike arrives for a neuron that is already pending.
module stdp_engine
  import neuro_pkg::*;
#(
  parameter int N_NEURONS = 25,
  parameter int FB        = FRAC_BITS,
  localparam int IW = $clog2(N_NEURONS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_NEURONS-1:0] spike,
  input  logic                 p_mat   [N_NEURONS][N_NEURONS],
  input  weight_t              w_mat   [N_NEURONS][N_NEURONS],
  input  trace_t               tr_p    [N_NEURONS],
  input  trace_t               tr_q    [N_NEURONS],
  input  trace_t               tr_pre  [N_NEURONS],
  input  trace_t               tr_post [N_NEURONS],
  input  weight_t              w_ltp,
  input  weight_t              w_ltd,
  output logic                 upd_we,
  output logic [IW-1:0]        upd_row,
  output logic [IW-1:0]        upd_col,
  output weight_t              upd_weight,
  output logic [N_NEURONS-1:0] restart,
  output logic                 event_done,
  output logic                 merged,
  output logic                 busy
);
  typedef enum logic [2:0] {S_IDLE, S_EPS, S_LTP, S_LTD, S_RESTART} state_e;
  typedef logic [FB-1:0] frac_t;

  state_e                 state;
  logic [N_NEURONS-1:0]   pending;
  logic [IW-1:0]          cur;
  logic [IW-1:0]          k;
  frac_t                  eps_pre  [N_NEURONS];
  frac_t                  eps_post [N_NEURONS];

  // Lowest pending neuron.
  logic [IW-1:0] pick;
  logic          pick_valid;
  always_comb begin
    pick       = '0;
    pick_valid = 1'b0;
    for (int n = N_NEURONS - 1; n >= 0; n--)
      if (pending[n]) begin
        pick       = IW'(n);
        pick_valid = 1'b1;
      end
  end

  function automatic frac_t top(input trace_t t);
    return t[TR_BITS-1 -: FB];
  endfunction

  function automatic frac_t fmul(input frac_t a, input frac_t b);
    logic [2*FB-1:0] p;
    p = a * b;
    return p[2*FB-1 -: FB];
  endfunction

  // Weight step of the current synapse.
  weight_t w_old, w_new, gap, dw;
  frac_t   gain;
  logic    plastic;
  logic [W_BITS+FB-1:0] prod;
  always_comb begin
    w_new   = '0;
    gain    = '0;
    gap     = '0;
    if (state == S_LTP) begin
      plastic = p_mat[k][cur];
      w_old   = w_mat[k][cur];
      gain    = fmul(fmul(eps_post[cur], eps_pre[k]), top(tr_p[k]));
      gap     = (w_old < w_ltp) ? w_ltp - w_old : '0;
    end else begin
      plastic = p_mat[cur][k];
      w_old   = w_mat[cur][k];
      gain    = fmul(fmul(eps_pre[cur], eps_post[k]), top(tr_q[k]));
      gap     = (w_old > w_ltd) ? w_old - w_ltd : '0;
    end
    prod = gap * gain;
    dw   = prod[W_BITS+FB-1 -: W_BITS];
    w_new = (state == S_LTP) ? w_old + dw : w_old - dw;
  end

  always_comb begin
    upd_we     = plastic && (state == S_LTP || state == S_LTD);
    upd_row    = (state == S_LTP) ? k : cur;
    upd_col    = (state == S_LTP) ? cur : k;
    upd_weight = w_new;
    busy       = (state != S_IDLE) || (pending != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pending    <= '0;
      cur        <= '0;
      k          <= '0;
      restart    <= '0;
      event_done <= 1'b0;
      merged     <= 1'b0;
      for (int n = 0; n < N_NEURONS; n++) begin
        eps_pre[n]  <= '1;
        eps_post[n] <= '1;
      end
    end else begin
      restart    <= '0;
      event_done <= 1'b0;
      merged     <= |(spike & pending & ~((state == S_IDLE && pick_valid) ?
                                          (N_NEURONS'(1) << pick) : '0));
      unique case (state)
        S_IDLE: begin
          pending <= pending | spike;
          if (pick_valid) begin
            pending[pick] <= spike[pick];
            cur           <= pick;
            state         <= S_EPS;
          end
        end
        S_EPS: begin
          pending       <= pending | spike;
          eps_pre[cur]  <= ~top(tr_pre[cur]);
          eps_post[cur] <= ~top(tr_post[cur]);
          k             <= '0;
          state         <= S_LTP;
        end
        S_LTP: begin
          pending <= pending | spike;
          k       <= (k == IW'(N_NEURONS - 1)) ? '0 : k + 1'b1;
          if (k == IW'(N_NEURONS - 1)) state <= S_LTD;
        end
        S_LTD: begin
          pending <= pending | spike;
          k       <= k + 1'b1;
          if (k == IW'(N_NEURONS - 1)) state <= S_RESTART;
        end
        S_RESTART: begin
          pending      <= pending | spike;
          restart[cur] <= 1'b1;
          event_done   <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A weight written by the engine never leaves the soft-bound interval
  // unless it started outside it.
  assert property (@(posedge clk) disable iff (!rst_n)
    (upd_we && state == S_LTP && w_old <= w_ltp) |-> (upd_weight <= w_ltp));
  assert property (@(posedge clk) disable iff (!rst_n)
    (upd_we && state == S_LTD && w_old >= w_ltd) |-> (upd_weight >= w_ltd));
endmodule
