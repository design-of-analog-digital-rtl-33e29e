// synapse_matrix: network connectivity and plasticity.
// Holds the plasticity matrix [P] (1 bit per synapse: 1 = the synapse follows
// the STDP rule) and the weight matrix [W] (10 bits per synapse). Row j is the
// pre-synaptic neuron, column i the post-synaptic one; P = 0 and W = 0 means
// no connection. Both matrices are registers so that the stimulation and STDP
// logic can read a whole row or column in the same clock (a choice of this
// design). Two write ports:
//   upd_*  weight update from the STDP engine (has priority)
//   host_* configuration from the host (weight and plastic bit together);
//          host_ack is high in the cycle the write is accepted, i.e. when
//          host_we is high and upd_we is low.
// Writes take effect at the next clock edge. Reset clears both matrices.
module synapse_matrix
  import neuro_pkg::*;
#(
  parameter int N_NEURONS = 25,
  localparam int IW = $clog2(N_NEURONS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          host_we,
  input  logic [IW-1:0] host_row,
  input  logic [IW-1:0] host_col,
  input  logic          host_plastic,
  input  weight_t       host_weight,
  output logic          host_ack,
  input  logic          upd_we,
  input  logic [IW-1:0] upd_row,
  input  logic [IW-1:0] upd_col,
  input  weight_t       upd_weight,
  output logic          p_mat [N_NEURONS][N_NEURONS],
  output weight_t       w_mat [N_NEURONS][N_NEURONS]
);
  always_comb host_ack = host_we && !upd_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_NEURONS; j++)
        for (int i = 0; i < N_NEURONS; i++) begin
          p_mat[j][i] <= 1'b0;
          w_mat[j][i] <= '0;
        end
    end else if (upd_we) begin
      w_mat[upd_row][upd_col] <= upd_weight;
    end else if (host_we) begin
      w_mat[host_row][host_col] <= host_weight;
      p_mat[host_row][host_col] <= host_plastic;
    end
  end
endmodule
