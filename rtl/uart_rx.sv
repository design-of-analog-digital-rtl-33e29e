// uart_rx: RS232 receiver for the host link, 8 data bits, no parity, one
// stop bit, LSB first (framing and rate are this design's choices; the
// default CLK_DIV = 434 gives 115200 baud from 50 MHz). The input is
// synchronised, a start bit is confirmed at its middle, and every bit is
// sampled in its middle. valid pulses for one clock with data when a frame
// with a correct stop bit has been received; a frame with a bad stop bit is
// dropped.
module uart_rx #(
  parameter int CLK_DIV = 434
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  localparam int CW = $clog2(CLK_DIV + 1);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  rstate_e       st;
  logic          r1, r2;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= 1'b1; r2 <= 1'b1;
      st <= R_IDLE; cnt <= '0; bitn <= '0; sh <= '0;
      valid <= 1'b0; data <= '0;
    end else begin
      r1 <= rxd;
      r2 <= r1;
      valid <= 1'b0;
      unique case (st)
        R_IDLE:
          if (!r2) begin
            st  <= R_START;
            cnt <= CW'(CLK_DIV / 2 - 1);
          end
        R_START:
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (r2) st <= R_IDLE;
          else begin
            st <= R_DATA; cnt <= CW'(CLK_DIV - 1); bitn <= '0;
          end
        R_DATA:
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            sh  <= {r2, sh[7:1]};
            cnt <= CW'(CLK_DIV - 1);
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) st <= R_STOP;
          end
        R_STOP:
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            st <= R_IDLE;
            if (r2) begin
              valid <= 1'b1;
              data  <= sh;
            end
          end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
