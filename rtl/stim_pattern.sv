// stim_pattern: predefined stimulation of individual neurons.
// Besides the network's own synapses, any neuron can be driven by a regular
// stimulus train set up by the host: neuron n, when enabled, receives one
// stimulation event every period[n] milliseconds with weight weight[n]. The
// events (stim, one-clock pulses, with stim_w) go to syn_stim, which turns
// each into weight x STIM_SCALE clocks of excitatory trigger, like a synaptic
// event. That neurons can receive predefined stimulation follows the design
// description; the pattern form (a periodic train with a 16-bit period in
// ms, excitatory only) is this design's choice.
// Interface: a configuration write (cfg_we with cfg_n, cfg_en, cfg_period,
// cfg_weight) sets one neuron and restarts its train; the first event comes
// cfg_period ms later (a period of 0 acts as 1 ms). A millisecond tick comes
// from an internal MS_DIV prescaler (50000 clocks at 50 MHz); all due events
// are issued on the clock after the tick.
module stim_pattern
  import neuro_pkg::*;
#(
  parameter int N_NEURONS = 25,
  parameter int MS_DIV    = 50_000,
  localparam int IW = $clog2(N_NEURONS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [IW-1:0]        cfg_n,
  input  logic                 cfg_en,
  input  logic [15:0]          cfg_period,
  input  weight_t              cfg_weight,
  output logic [N_NEURONS-1:0] stim,
  output weight_t              stim_w [N_NEURONS]
);
  localparam int DW = $clog2(MS_DIV + 1);

  logic [DW-1:0]        div;
  logic                 ms;
  logic [N_NEURONS-1:0] en;
  logic [15:0]          period [N_NEURONS];
  logic [15:0]          left   [N_NEURONS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div  <= '0;
      ms   <= 1'b0;
      en   <= '0;
      stim <= '0;
      for (int n = 0; n < N_NEURONS; n++) begin
        period[n] <= '0;
        left[n]   <= '0;
        stim_w[n] <= '0;
      end
    end else begin
      ms   <= (div == DW'(MS_DIV - 1));
      div  <= (div == DW'(MS_DIV - 1)) ? '0 : div + 1'b1;
      stim <= '0;
      for (int n = 0; n < N_NEURONS; n++) begin
        if (cfg_we && cfg_n == IW'(n)) begin
          en[n]     <= cfg_en;
          period[n] <= cfg_period;
          left[n]   <= cfg_period;
          stim_w[n] <= cfg_weight;
        end else if (ms && en[n]) begin
          if (left[n] <= 16'd1) begin
            stim[n] <= 1'b1;
            left[n] <= period[n];
          end else begin
            left[n] <= left[n] - 1'b1;
          end
        end
      end
    end
  end
endmodule
