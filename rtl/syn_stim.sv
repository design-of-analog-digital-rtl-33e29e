// syn_stim: synaptic stimulation of the analog neurons.
// Each analog neuron has two multi-synapse trigger inputs, one excitatory and
// one inhibitory. When pre-synaptic neuron j spikes, every post-synaptic
// neuron i with a non-zero weight w_ji receives w_ji * SCALE clocks of
// trigger on its excitatory input, or on its inhibitory input when j is
// flagged inhibitory (inhib[j]). Widths of several spikes add up in a
// per-input counter (saturating at 2^CNT_BITS-1), so the trigger integrates
// the weighted events; the trigger is high while the counter is non-zero and
// the counter counts down once every SCALE clocks. That the weight is coded
// as a pulse width, the per-neuron sign flag and SCALE = 50 (1 us per weight
// step at 50 MHz) are this design's choices; the description only states
// that the weighted events form the digital control of each multi-synapse.
// Predefined stimulation (stim[i] with weight stim_w[i], from stim_pattern)
// adds to neuron i's excitatory counter in the same way, in the clock it
// arrives.
// Timing: spikes are latched in a pending vector and served one pre-synaptic
// neuron per clock, lowest index first; the trigger of a served spike rises
// two clocks after its spike pulse.
module syn_stim
  import neuro_pkg::*;
#(
  parameter int N_NEURONS = 25,
  parameter int SCALE     = 50,
  parameter int CNT_BITS  = 16,
  localparam int IW = $clog2(N_NEURONS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_NEURONS-1:0] spike,
  input  weight_t              w_mat [N_NEURONS][N_NEURONS],
  input  logic [N_NEURONS-1:0] inhib,
  input  logic [N_NEURONS-1:0] stim,
  input  weight_t              stim_w [N_NEURONS],
  output logic [N_NEURONS-1:0] syn_exc,
  output logic [N_NEURONS-1:0] syn_inh
);
  localparam int SW = $clog2(SCALE + 1);

  logic [N_NEURONS-1:0] pending;
  logic [CNT_BITS-1:0]  cnt_exc [N_NEURONS];
  logic [CNT_BITS-1:0]  cnt_inh [N_NEURONS];
  logic [SW-1:0]        pre;
  logic                 unit;

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

  function automatic logic [CNT_BITS-1:0] sat_add(input logic [CNT_BITS-1:0] a,
                                                  input weight_t w);
    logic [CNT_BITS:0] s;
    s = {1'b0, a} + (CNT_BITS+1)'(w);
    return s[CNT_BITS] ? '1 : s[CNT_BITS-1:0];
  endfunction

  function automatic logic [CNT_BITS-1:0] dec(input logic [CNT_BITS-1:0] a, input logic en);
    return (en && a != '0) ? a - 1'b1 : a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      pre     <= '0;
      unit    <= 1'b0;
      for (int i = 0; i < N_NEURONS; i++) begin
        cnt_exc[i] <= '0;
        cnt_inh[i] <= '0;
      end
    end else begin
      pre  <= (pre == SW'(SCALE - 1)) ? '0 : pre + 1'b1;
      unit <= (pre == SW'(SCALE - 1));
      pending <= (pending | spike) & ~(pick_valid ? (N_NEURONS'(1) << pick) : '0);
      for (int i = 0; i < N_NEURONS; i++) begin
        logic [CNT_BITS-1:0] e;
        e = dec(cnt_exc[i], unit);
        if (pick_valid && !inhib[pick]) e = sat_add(e, w_mat[pick][i]);
        if (stim[i]) e = sat_add(e, stim_w[i]);
        cnt_exc[i] <= e;
        if (pick_valid && inhib[pick])
          cnt_inh[i] <= sat_add(dec(cnt_inh[i], unit), w_mat[pick][i]);
        else
          cnt_inh[i] <= dec(cnt_inh[i], unit);
      end
    end
  end

  always_comb
    for (int i = 0; i < N_NEURONS; i++) begin
      syn_exc[i] = (cnt_exc[i] != '0);
      syn_inh[i] = (cnt_inh[i] != '0);
    end
endmodule
