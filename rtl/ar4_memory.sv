// ar4_memory: the 256 x 8-bit memory of the RISC AR4.
//
// One byte per address, as in the processor description. Programs live in
// addresses 0..127 and instructions are stored big-endian, the high byte at
// the even address. The memory has a single port with a synchronous read: the
// byte at addr appears on rdata one clock after addr is presented. A write
// (we = 1) stores wdata at the clock edge; rdata then shows the old contents
// (read-before-write). The array is not reset. The synchronous single port is
// this design's choice, made so the array maps onto a block RAM.
module ar4_memory #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
