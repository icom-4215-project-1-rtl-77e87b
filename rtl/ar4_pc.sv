// ar4_pc: the 8-bit program counter of the RISC AR4.
//
// Reset puts the PC at 0, where every program starts. inc advances it by one
// instruction, two bytes; load replaces it with target (R7 on a taken branch)
// and wins over inc. pc_next1 is PC+1, the address of the low byte of the
// current instruction. The PC wraps modulo 256. The start address and the
// two-byte instruction come from the processor description.
module ar4_pc
  import ar4_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              inc,
  input  logic              load,
  input  logic [ADDR_W-1:0] target,
  output logic [ADDR_W-1:0] pc,
  output logic [ADDR_W-1:0] pc_next1
);

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= target;
    else if (inc)  pc <= pc + ADDR_W'(2);
  end

  assign pc_next1 = pc + ADDR_W'(1);

endmodule
