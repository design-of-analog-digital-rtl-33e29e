// neuro_pkg: sizes and types shared by the FPGA side of the neural network
// simulator. The network has 25 neurons on 5 analog chips (5 neurons each;
// these two counts are module parameters, N_NEURONS and N_CHIPS), synaptic
// weights of 10 bits, analog model parameters of 14 bits (205 per
// chip) and topology words of 14 bits (3 per chip). The exponential traces
// used by the plasticity rule are 2*EXP_N = 20 bits wide; a trace value of
// all ones stands for 1.0. All of these numbers come from the design
// description; FRAC_BITS (the width used in the STDP multiplications) is this
// design's own choice.
package neuro_pkg;
  localparam int W_BITS           = 10;
  localparam int PARAM_BITS       = 14;
  localparam int N_PARAMS         = 205;
  localparam int TOPO_BITS        = 14;
  localparam int TOPO_WORDS       = 3;
  localparam int EXP_N            = 10;
  localparam int TR_BITS          = 2 * EXP_N;
  localparam int FRAC_BITS        = 12;

  typedef logic [W_BITS-1:0]     weight_t;
  typedef logic [PARAM_BITS-1:0] param_t;
  typedef logic [TOPO_BITS-1:0]  topo_word_t;
  typedef logic [TR_BITS-1:0]    trace_t;

  localparam trace_t TRACE_ONE = '1;

  // Host link command codes (first byte of each command frame).
  typedef enum logic [7:0] {
    CMD_WRITE_SYN   = 8'h01,  // j, i, {plastic,5'b0,w[9:8]}, w[7:0]
    CMD_WRITE_PARAM = 8'h02,  // chip, addr, d[13:8], d[7:0]
    CMD_WRITE_TOPO  = 8'h03,  // chip, word, d[13:8], d[7:0]
    CMD_START_TOPO  = 8'h04,  // chip
    CMD_BOUNDS      = 8'h05,  // ltp[9:8], ltp[7:0], ltd[9:8], ltd[7:0]
    CMD_READ_W      = 8'h06,  // j, i          -> reply RSP_WEIGHT
    CMD_SET_INHIB   = 8'h07,  // j, flag
    CMD_REFRESH_EN  = 8'h08,  // flag
  CMD_PATTERN     = 8'h09   // n, period[15:8], period[7:0], {en,5'b0,w[9:8]}, w[7:0]
  } cmd_e;

  localparam logic [7:0] RSP_SPIKE  = 8'h80;  // n, t[31:24], t[23:16], t[15:8], t[7:0]
  localparam logic [7:0] RSP_WEIGHT = 8'h86;  // j, i, w[9:8], w[7:0]
endpackage
