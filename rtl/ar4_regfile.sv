// ar4_regfile: the eight 8-bit general purpose registers R0..R7.
//
// One write port (STA rf) and two read ports: rdata returns register f named
// by the instruction, r7 always returns R7, the register that holds branch
// targets. Reads are combinational; a write takes effect at the clock edge.
// All registers are visible on regs for display. The register count, width
// and the role of R7 follow the processor description; the synchronous reset
// to zero is this design's choice.
module ar4_regfile
  import ar4_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [REG_AW-1:0]        waddr,
  input  logic [DATA_W-1:0]        wdata,
  input  logic [REG_AW-1:0]        raddr,
  output logic [DATA_W-1:0]        rdata,
  output logic [DATA_W-1:0]        r7,
  output logic [NREGS-1:0][DATA_W-1:0] regs
);

  always_ff @(posedge clk) begin
    if (rst)     regs <= '0;
    else if (we) regs[waddr] <= wdata;
  end

  assign rdata = regs[raddr];
  assign r7    = regs[BRANCH_REG];

endmodule
