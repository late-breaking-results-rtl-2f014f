// sync_ram: simple dual-port block RAM (one write port, one read port).
//
// Models an FPGA block RAM: a write with we stores wdata at waddr on the clock
// edge; a read with re returns mem[raddr] one cycle later on rdata, which then
// holds until the next read. Reading and writing the same address in one cycle
// returns the old word. The accelerator keeps its value/index memory region
// and its input arrays in such RAMs; their sizes are this design's choice.
module sync_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
