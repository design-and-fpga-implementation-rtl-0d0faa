// dp_ram: simple dual-port RAM with one write and one registered read port.
//
// Holds the afferent weights of one readout unit. A write and a read to different
// addresses may happen in the same clock, which lets the learning pipeline read one
// weight while writing back the previous one. Read data appears one clock after the
// address. Reading the address being written returns the old word. The contents are
// not reset.
module dp_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
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
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
