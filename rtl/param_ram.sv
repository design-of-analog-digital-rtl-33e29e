// param_ram: on-chip RAM holding the DEPTH = 205 analog model parameters of
// one analog chip, WIDTH = 14 bits each, as in the description. One write
// port for the host link, one read port for the refresh controller; the read
// is registered (rdata is valid the clock after raddr). Addresses at or above
// DEPTH are ignored on write and read as 0. Contents are not reset.
module param_ram #(
  parameter int DEPTH = 205,
  parameter int WIDTH = 14,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
