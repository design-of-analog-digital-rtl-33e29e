// serial_dac_model: behavioural model of the serial DAC that turns the
// 14-bit parameter codes into voltages for the analog memory cells, for
// testbenches only. While cs_n is low it shifts din in on every rising edge
// of sclk, MSB first; when cs_n rises after exactly BITS bits it updates
// code (the value the output voltage represents) and counts the load. A
// frame of another length is counted in bad_frames and leaves code alone.
module serial_dac_model #(
  parameter int BITS = 14
) (
  input  logic            en,     // frames starting while low are ignored
  input  logic            sclk,
  input  logic            din,
  input  logic            cs_n,
  output logic [BITS-1:0] code,
  output int              loads,
  output int              bad_frames
);
  logic [BITS-1:0] sh;
  int n;

  initial begin code = '0; loads = 0; bad_frames = 0; n = -1; sh = '0; end

  always @(posedge sclk) if (!cs_n && n >= 0) begin sh = {sh[BITS-2:0], din}; n++; end
  always @(negedge cs_n) n = en ? 0 : -1;
  always @(posedge cs_n) begin
    if (n < 0) ;                 // no frame started while enabled
    else if (n == BITS) begin code = sh; loads++; end
    else bad_frames++;
  end
endmodule
