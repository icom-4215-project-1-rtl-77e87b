// ar4_ir: the 16-bit instruction register of the RISC AR4.
//
// An instruction is two memory bytes stored big-endian, so the register is
// filled in two steps: load_hi stores the byte from the even address into bits
// 15..8, load_lo the following byte into bits 7..0. The fields of the
// instruction formats are decoded from the register: the 5-bit opcode (bits
// 15..11), register f (bits 10..8) and the immediate operand or direct address
// (bits 7..0). Field positions follow the instruction formats; the reset value
// (all zero) is this design's choice.
module ar4_ir
  import ar4_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               load_hi,
  input  logic               load_lo,
  input  logic [DATA_W-1:0]  d,
  output logic [INSTR_W-1:0] ir,
  output opcode_e            opcode,
  output logic [REG_AW-1:0]  rf,
  output logic [DATA_W-1:0]  operand
);

  always_ff @(posedge clk) begin
    if (rst) ir <= '0;
    else begin
      if (load_hi) ir[15:8] <= d;
      if (load_lo) ir[7:0]  <= d;
    end
  end

  assign opcode  = opcode_e'(ir[15:11]);
  assign rf      = ir[10:8];
  assign operand = ir[7:0];

endmodule
