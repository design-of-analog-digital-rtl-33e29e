// uart_tx: RS232 transmitter for the host link, 8N1, LSB first, CLK_DIV
// clocks per bit (434 = 115200 baud at 50 MHz; framing and rate are this
// design's choices). A byte is accepted when valid and ready are both high;
// ready is low for the 10 bit times of the frame.
module uart_tx #(
  parameter int CLK_DIV = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  localparam int CW = $clog2(CLK_DIV + 1);
  logic [CW-1:0] cnt;
  logic [3:0]    left;
  logic [9:0]    sh;

  always_comb ready = (left == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; left <= '0; sh <= '1; txd <= 1'b1;
    end else if (left == '0) begin
      txd <= 1'b1;
      if (valid) begin
        sh   <= {1'b1, data, 1'b0};
        left <= 4'd10;
        cnt  <= '0;
      end
    end else begin
      txd <= sh[0];
      if (cnt == CW'(CLK_DIV - 1)) begin
        cnt  <= '0;
        sh   <= {1'b1, sh[9:1]};
        left <= left - 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
