// gaillimh_fpga: digital layer of a mixed analog/digital spiking neural
// network simulator.
// Twenty-five analog neurons on five analog chips compute membrane potentials
// in continuous time; each reports a spike on one pin (spike_pad) and takes
// an excitatory and an inhibitory synaptic trigger (syn_exc, syn_inh). This
// FPGA closes the network around them in real time:
//   spike_input     synchronises the spike pins and time-stamps in us
//   syn_stim        on a spike of neuron j, triggers the synapses j->i with
//                   pulse widths set by the weights w_ji
//   stim_pattern    predefined periodic stimulation of individual neurons
//   stdp_engine     updates plastic weights (LTP/LTD with memory effect and
//                   soft bounds) for each spike, using
//   neuron_traces   four exponential traces per neuron (exp_decay, tick_gen)
//   synapse_matrix  plasticity bits and 10-bit weights, 25 x 25
//   host_if         RS232 (uart_rx / uart_tx) configuration and reporting of
//                   time-stamped spikes and weights
//   per chip:       param_ram + param_refresh keep the 205 analog parameters
//                   refreshed through a serial DAC (one round per 2.05 ms);
//                   topo_serializer sends the 3 topology words on request.
// Neuron n belongs to chip n/5. The system clock is 50 MHz (20 ns); the
// trace tick periods default to tau/1024 clocks for tau_p = 14.8 ms,
// tau_q = 33.8 ms, tau_pre = 28 ms and tau_post = 88 ms. The block division,
// sizes and time constants follow the design description; the host protocol,
// the synaptic trigger coding and the chip/DAC serial framing are this
// design's choices (see each block). The neurons themselves, the DACs and the
// chips' configuration logic are outside the FPGA and appear here as ports.
module gaillimh_fpga
  import neuro_pkg::*;
#(
  parameter int N_NEURONS = 25,
  parameter int N_CHIPS   = 5,
  parameter int CLK_HZ    = 50_000_000,
  parameter int BAUD      = 115_200,
  parameter int TICK_P    = 723,
  parameter int TICK_Q    = 1650,
  parameter int TICK_PRE  = 1367,
  parameter int TICK_POST = 4297,
  parameter int SER_HALF  = CLK_HZ / 200_000,   // 100 kHz chip serial clocks
  parameter int STIM_SCALE = CLK_HZ / 1_000_000, // 1 us of trigger per weight step
  parameter int MS_DIV    = CLK_HZ / 1_000       // stimulation pattern time unit
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 uart_rxd,
  output logic                 uart_txd,
  input  logic [N_NEURONS-1:0] spike_pad,
  output logic [N_NEURONS-1:0] syn_exc,
  output logic [N_NEURONS-1:0] syn_inh,
  output logic [N_CHIPS-1:0]   topo_clk,
  output logic [N_CHIPS-1:0]   topo_data,
  output logic [N_CHIPS-1:0]   topo_valid,
  output logic [N_CHIPS-1:0]   mc_clk,
  output logic [N_CHIPS-1:0]   mc_reset_n,
  output logic [N_CHIPS-1:0]   mc_enable_n,
  output logic [N_CHIPS-1:0]   dac_sclk,
  output logic [N_CHIPS-1:0]   dac_din,
  output logic [N_CHIPS-1:0]   dac_cs_n,
  output logic [15:0]          events_dropped,
  // status
  output logic                 stdp_busy,
  output logic                 stdp_event,
  output logic                 stdp_merged,
  output logic [N_CHIPS-1:0]   topo_busy,
  output logic [N_CHIPS-1:0]   topo_done,
  output logic [N_CHIPS-1:0]   refresh_round
);
  localparam int IW = $clog2(N_NEURONS);
  localparam int AW = $clog2(N_PARAMS);
  localparam int CLK_DIV = CLK_HZ / BAUD;

  // host link
  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLK_DIV(CLK_DIV)) u_rx (.clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data));
  uart_tx #(.CLK_DIV(CLK_DIV)) u_tx (.clk, .rst_n, .valid(tx_valid), .data(tx_data),
                                     .ready(tx_ready), .txd(uart_txd));

  // spikes
  logic [N_NEURONS-1:0] spike;
  logic [31:0]          timestamp;
  spike_input #(.N_NEURONS(N_NEURONS), .US_DIV(CLK_HZ / 1_000_000)) u_spk (
    .clk, .rst_n, .spike_pad, .spike, .timestamp);

  // network
  logic          syn_we, syn_plastic, syn_ack;
  logic [IW-1:0] syn_row, syn_col;
  weight_t       syn_weight;
  logic          upd_we;
  logic [IW-1:0] upd_row, upd_col;
  weight_t       upd_weight;
  logic          p_mat [N_NEURONS][N_NEURONS];
  weight_t       w_mat [N_NEURONS][N_NEURONS];
  weight_t       w_ltp, w_ltd;
  logic [N_NEURONS-1:0] inhib, restart;
  trace_t        tr_p [N_NEURONS], tr_q [N_NEURONS], tr_pre [N_NEURONS], tr_post [N_NEURONS];

  synapse_matrix #(.N_NEURONS(N_NEURONS)) u_mat (
    .clk, .rst_n,
    .host_we(syn_we), .host_row(syn_row), .host_col(syn_col), .host_plastic(syn_plastic),
    .host_weight(syn_weight), .host_ack(syn_ack),
    .upd_we, .upd_row, .upd_col, .upd_weight, .p_mat, .w_mat);

  neuron_traces #(.N_NEURONS(N_NEURONS), .TICK_P(TICK_P), .TICK_Q(TICK_Q),
                  .TICK_PRE(TICK_PRE), .TICK_POST(TICK_POST)) u_tr (
    .clk, .rst_n, .restart, .tr_p, .tr_q, .tr_pre, .tr_post);

  stdp_engine #(.N_NEURONS(N_NEURONS)) u_stdp (
    .clk, .rst_n, .spike, .p_mat, .w_mat, .tr_p, .tr_q, .tr_pre, .tr_post, .w_ltp, .w_ltd,
    .upd_we, .upd_row, .upd_col, .upd_weight, .restart,
    .event_done(stdp_event), .merged(stdp_merged), .busy(stdp_busy));

  // predefined stimulation
  logic                 pat_we, pat_en;
  logic [IW-1:0]        pat_n;
  logic [15:0]          pat_period;
  weight_t              pat_weight;
  logic [N_NEURONS-1:0] stim;
  weight_t              stim_w [N_NEURONS];

  stim_pattern #(.N_NEURONS(N_NEURONS), .MS_DIV(MS_DIV)) u_pat (
    .clk, .rst_n, .cfg_we(pat_we), .cfg_n(pat_n), .cfg_en(pat_en), .cfg_period(pat_period),
    .cfg_weight(pat_weight), .stim, .stim_w);

  syn_stim #(.N_NEURONS(N_NEURONS), .SCALE(STIM_SCALE)) u_stim (
    .clk, .rst_n, .spike, .w_mat, .inhib, .stim, .stim_w, .syn_exc, .syn_inh);

  // analog chip configuration
  logic [N_CHIPS-1:0] param_we, topo_start;
  logic [AW-1:0]      param_addr;
  param_t             param_data;
  topo_word_t         topo_words [N_CHIPS][TOPO_WORDS];
  logic               refresh_en;

  host_if #(.N_NEURONS(N_NEURONS), .N_CHIPS(N_CHIPS)) u_host (
    .clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .spike, .timestamp,
    .syn_we, .syn_row, .syn_col, .syn_plastic, .syn_weight, .syn_ack, .w_mat,
    .w_ltp, .w_ltd, .inhib,
    .param_we, .param_addr, .param_data, .topo_words, .topo_start, .refresh_en,
    .pat_we, .pat_n, .pat_en, .pat_period, .pat_weight,
    .dropped(events_dropped));

  for (genvar c = 0; c < N_CHIPS; c++) begin : g_chip
    logic [AW-1:0] raddr;
    param_t        rdata;

    param_ram #(.DEPTH(N_PARAMS), .WIDTH(PARAM_BITS)) u_ram (
      .clk, .we(param_we[c]), .waddr(param_addr), .wdata(param_data), .raddr, .rdata);

    param_refresh #(.N_PARAMS(N_PARAMS), .PARAM_BITS(PARAM_BITS), .HALF(SER_HALF)) u_ref (
      .clk, .rst_n, .en(refresh_en), .raddr, .rdata,
      .mc_clk(mc_clk[c]), .mc_reset_n(mc_reset_n[c]), .mc_enable_n(mc_enable_n[c]),
      .dac_sclk(dac_sclk[c]), .dac_din(dac_din[c]), .dac_cs_n(dac_cs_n[c]),
      .round_done(refresh_round[c]));

    topo_serializer #(.WORD_BITS(TOPO_BITS), .N_WORDS(TOPO_WORDS), .HALF(SER_HALF)) u_topo (
      .clk, .rst_n, .start(topo_start[c]), .words(topo_words[c]),
      .busy(topo_busy[c]), .done(topo_done[c]),
      .ser_clk(topo_clk[c]), .ser_data(topo_data[c]), .ser_valid(topo_valid[c]));
  end
endmodule
