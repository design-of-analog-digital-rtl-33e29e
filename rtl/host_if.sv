// host_if: command decoder and reply framer of the host link.
// The host configures the network and the analog chips and receives the
// network activity over a byte stream (RS232 in the top level). Every command
// is an opcode byte followed by a fixed number of argument bytes
// (see neuro_pkg::cmd_e):
//   01 j i {P,5'b0,w[9:8]} w[7:0]   write synapse j->i: weight and plastic bit
//   02 chip addr d[13:8] d[7:0]     write analog parameter addr of a chip
//   03 chip word d[13:8] d[7:0]     write topology word 0..2 of a chip
//   04 chip                         send the chip's three topology words
//   05 ltp[9:8] ltp[7:0] ltd[9:8] ltd[7:0]   STDP soft bounds W_LTP, W_LTD
//   06 j i                          read weight j->i, reply 86 j i w[9:8] w[7:0]
//   07 j flag                       synapses of neuron j are inhibitory (flag=1)
//   08 flag                         run (1) or stop (0) the parameter refresh
//   09 n p[15:8] p[7:0] {en,5'b0,w[9:8]} w[7:0]
//                                   stimulation train of neuron n: every p ms,
//                                   weight w, enabled by en
// Unknown opcodes are skipped. Every spike is reported as
//   80 n t[31:24] t[23:16] t[15:8] t[7:0]
// with its microsecond time stamp. Spikes are latched with their time stamp in
// a per-neuron pending vector, moved one per clock into an event FIFO of
// FIFO_DEPTH entries and sent when the transmitter is free; a weight reply
// goes first. A spike that finds the FIFO full is dropped and counted in
// dropped. A synapse write waits (syn_we held) until the matrix accepts it
// (syn_ack), because plasticity writes have priority. The command set, byte
// format, FIFO and reset values (W_LTP = 1023, W_LTD = 0, all synapses
// excitatory, refresh stopped) are this design's choices; the description only
// says that configuration comes from the host and that time-stamped spikes and
// weight evolution go back to it.
module host_if
  import neuro_pkg::*;
#(
  parameter int N_NEURONS  = 25,
  parameter int N_CHIPS    = 5,
  parameter int FIFO_DEPTH = 16,
  localparam int IW = $clog2(N_NEURONS),
  localparam int AW = $clog2(N_PARAMS),
  localparam int CW = $clog2(N_CHIPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // byte stream
  input  logic                 rx_valid,
  input  logic [7:0]           rx_data,
  output logic                 tx_valid,
  output logic [7:0]           tx_data,
  input  logic                 tx_ready,
  // spikes to report
  input  logic [N_NEURONS-1:0] spike,
  input  logic [31:0]          timestamp,
  // synapse matrix
  output logic                 syn_we,
  output logic [IW-1:0]        syn_row,
  output logic [IW-1:0]        syn_col,
  output logic                 syn_plastic,
  output weight_t              syn_weight,
  input  logic                 syn_ack,
  input  weight_t              w_mat [N_NEURONS][N_NEURONS],
  // plasticity and stimulation settings
  output weight_t              w_ltp,
  output weight_t              w_ltd,
  output logic [N_NEURONS-1:0] inhib,
  // analog chip configuration
  output logic [N_CHIPS-1:0]   param_we,
  output logic [AW-1:0]        param_addr,
  output param_t               param_data,
  output topo_word_t           topo_words [N_CHIPS][TOPO_WORDS],
  output logic [N_CHIPS-1:0]   topo_start,
  output logic                 refresh_en,
  // predefined stimulation
  output logic                 pat_we,
  output logic [IW-1:0]        pat_n,
  output logic                 pat_en,
  output logic [15:0]          pat_period,
  output weight_t              pat_weight,
  output logic [15:0]          dropped
);
  localparam int FW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------ decoder
  logic [7:0] op;
  logic [7:0] arg [5];
  logic [2:0] need, got;
  logic       in_cmd;

  function automatic logic [2:0] n_args(input logic [7:0] o);
    case (o)
      CMD_PATTERN:                                                return 3'd5;
      CMD_WRITE_SYN, CMD_WRITE_PARAM, CMD_WRITE_TOPO, CMD_BOUNDS: return 3'd4;
      CMD_READ_W, CMD_SET_INHIB:                                  return 3'd2;
      CMD_START_TOPO, CMD_REFRESH_EN:                             return 3'd1;
      default:                                                    return 3'd0;
    endcase
  endfunction

  logic       exec;
  logic       tx_grant_rd;
  logic       rd_req;
  logic [IW-1:0] rd_j, rd_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op <= '0; need <= '0; got <= '0; in_cmd <= 1'b0; exec <= 1'b0;
      for (int a = 0; a < 5; a++) arg[a] <= '0;
    end else begin
      exec <= 1'b0;
      if (rx_valid) begin
        if (!in_cmd) begin
          if (n_args(rx_data) != 3'd0) begin
            op     <= rx_data;
            need   <= n_args(rx_data);
            got    <= '0;
            in_cmd <= 1'b1;
          end
        end else begin
          arg[got] <= rx_data;
          got <= got + 1'b1;
          if (got + 1'b1 == need) begin
            in_cmd <= 1'b0;
            exec   <= 1'b1;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ execution
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn_we <= 1'b0; syn_row <= '0; syn_col <= '0; syn_plastic <= 1'b0; syn_weight <= '0;
      w_ltp <= '1; w_ltd <= '0; inhib <= '0;
      param_we <= '0; param_addr <= '0; param_data <= '0;
      topo_start <= '0; refresh_en <= 1'b0;
      pat_we <= 1'b0; pat_n <= '0; pat_en <= 1'b0; pat_period <= '0; pat_weight <= '0;
      rd_req <= 1'b0; rd_j <= '0; rd_i <= '0;
      for (int c = 0; c < N_CHIPS; c++)
        for (int w = 0; w < TOPO_WORDS; w++) topo_words[c][w] <= '0;
    end else begin
      param_we   <= '0;
      topo_start <= '0;
      pat_we     <= 1'b0;
      if (syn_we && syn_ack) syn_we <= 1'b0;
      if (rd_req && tx_grant_rd) rd_req <= 1'b0;
      if (exec) begin
        unique case (op)
          CMD_WRITE_SYN: begin
            syn_we      <= 1'b1;
            syn_row     <= IW'(arg[0]);
            syn_col     <= IW'(arg[1]);
            syn_plastic <= arg[2][7];
            syn_weight  <= {arg[2][1:0], arg[3]};
          end
          CMD_WRITE_PARAM: begin
            if (int'(arg[0]) < N_CHIPS) param_we[CW'(arg[0])] <= 1'b1;
            param_addr <= AW'(arg[1]);
            param_data <= {arg[2][5:0], arg[3]};
          end
          CMD_WRITE_TOPO:
            if (int'(arg[0]) < N_CHIPS && int'(arg[1]) < TOPO_WORDS)
              topo_words[CW'(arg[0])][arg[1][1:0]] <= {arg[2][5:0], arg[3]};
          CMD_START_TOPO:
            if (int'(arg[0]) < N_CHIPS) topo_start[CW'(arg[0])] <= 1'b1;
          CMD_BOUNDS: begin
            w_ltp <= {arg[0][1:0], arg[1]};
            w_ltd <= {arg[2][1:0], arg[3]};
          end
          CMD_READ_W: begin
            rd_req <= 1'b1;
            rd_j   <= IW'(arg[0]);
            rd_i   <= IW'(arg[1]);
          end
          CMD_SET_INHIB:
            if (int'(arg[0]) < N_NEURONS) inhib[IW'(arg[0])] <= arg[1][0];
          CMD_REFRESH_EN: refresh_en <= arg[0][0];
          CMD_PATTERN:
            if (int'(arg[0]) < N_NEURONS) begin
              pat_we     <= 1'b1;
              pat_n      <= IW'(arg[0]);
              pat_period <= {arg[1], arg[2]};
              pat_en     <= arg[3][7];
              pat_weight <= {arg[3][1:0], arg[4]};
            end
          default: ;
        endcase
      end
    end
  end

  // ------------------------------------------------------------ spike events
  logic [N_NEURONS-1:0] evp;
  logic [31:0]          ts_lat [N_NEURONS];
  logic [IW-1:0]        fifo_n [FIFO_DEPTH];
  logic [31:0]          fifo_t [FIFO_DEPTH];
  logic [FW-1:0]        wr_ptr, rd_ptr;
  logic [FW:0]          count;
  logic                 pop;

  logic [IW-1:0] pick;
  logic          pick_valid;
  always_comb begin
    pick       = '0;
    pick_valid = 1'b0;
    for (int n = N_NEURONS - 1; n >= 0; n--)
      if (evp[n]) begin
        pick       = IW'(n);
        pick_valid = 1'b1;
      end
  end

  logic push;
  always_comb push = pick_valid && (int'(count) < FIFO_DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evp <= '0; wr_ptr <= '0; rd_ptr <= '0; count <= '0; dropped <= '0;
      for (int n = 0; n < N_NEURONS; n++) ts_lat[n] <= '0;
      for (int e = 0; e < FIFO_DEPTH; e++) begin
        fifo_n[e] <= '0;
        fifo_t[e] <= '0;
      end
    end else begin
      for (int n = 0; n < N_NEURONS; n++)
        if (spike[n] && !(evp[n] && !(pick_valid && pick == IW'(n))))
          ts_lat[n] <= timestamp;
      evp <= (evp & ~(pick_valid ? (N_NEURONS'(1) << pick) : '0)) | spike;
      if (push) begin
        fifo_n[wr_ptr] <= pick;
        fifo_t[wr_ptr] <= ts_lat[pick];
        wr_ptr <= (int'(wr_ptr) == FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      end else if (pick_valid && dropped != '1) begin
        dropped <= dropped + 1'b1;
      end
      if (pop) rd_ptr <= (int'(rd_ptr) == FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + (FW+1)'(push) - (FW+1)'(pop);
    end
  end

  // ------------------------------------------------------------ reply framer
  logic [7:0] frame [6];
  logic [2:0] flen, fidx;
  weight_t    rd_w;

  always_comb begin
    rd_w        = w_mat[rd_j][rd_i];
    tx_grant_rd = (flen == '0) && rd_req;
    pop         = (flen == '0) && !rd_req && (count != '0);
    tx_valid    = (flen != '0);
    tx_data     = frame[fidx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flen <= '0; fidx <= '0;
      for (int b = 0; b < 6; b++) frame[b] <= '0;
    end else if (flen == '0) begin
      fidx <= '0;
      if (tx_grant_rd) begin
        frame[0] <= RSP_WEIGHT;
        frame[1] <= 8'(rd_j);
        frame[2] <= 8'(rd_i);
        frame[3] <= 8'(rd_w[W_BITS-1:8]);
        frame[4] <= rd_w[7:0];
        flen     <= 3'd5;
      end else if (pop) begin
        frame[0] <= RSP_SPIKE;
        frame[1] <= 8'(fifo_n[rd_ptr]);
        frame[2] <= fifo_t[rd_ptr][31:24];
        frame[3] <= fifo_t[rd_ptr][23:16];
        frame[4] <= fifo_t[rd_ptr][15:8];
        frame[5] <= fifo_t[rd_ptr][7:0];
        flen     <= 3'd6;
      end
    end else if (tx_ready) begin
      if (fidx + 1'b1 == flen) begin
        flen <= '0;
        fidx <= '0;
      end else begin
        fidx <= fidx + 1'b1;
      end
    end
  end
endmodule
