// ar4_alu: the arithmetic and logic unit of the RISC AR4.
//
// Combinational. Operand a is the accumulator, operand b is register f. The
// operations are those of the instruction set: AND, OR, XOR, ADDC (a + b +
// carry), SUB (a - b), NEG (two's complement of a), NOT (one's complement of
// a), RLC and RRC (rotate a left/right through the carry flag). Besides the
// 8-bit result it returns new ZCNO flags and a mask telling which of them the
// operation writes; the status register keeps the others.
//
// The operations and the meaning of Z, C, N and O follow the processor
// description. Which flags each operation writes is this design's choice:
//   logic ops and NOT    write Z, N
//   ADDC, SUB, NEG       write Z, C, N, O (O = two's complement overflow)
//   RLC, RRC             write Z, C, N (C = bit rotated out)
// For SUB and NEG the carry flag is a borrow: it is 1 when the unsigned
// subtraction a - b (or 0 - a) needs one.
module ar4_alu
  import ar4_pkg::*;
(
  input  alu_op_e          op,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              carry_in,
  output logic [DATA_W-1:0] result,
  output flags_t            flags,     // new values of the written flags
  output flags_t            flags_we   // 1 for each flag the operation writes
);

  logic [DATA_W:0] wide;   // result with carry/borrow in the top bit
  logic            ovf;

  always_comb begin
    wide     = '0;
    ovf      = 1'b0;
    flags_we = '{z: 1'b1, c: 1'b0, n: 1'b1, o: 1'b0};
    unique case (op)
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      ALU_XOR: wide = {1'b0, a ^ b};
      ALU_NOT: wide = {1'b0, ~a};
      ALU_ADDC: begin
        wide     = {1'b0, a} + {1'b0, b} + {{DATA_W{1'b0}}, carry_in};
        ovf      = (a[DATA_W-1] == b[DATA_W-1]) && (wide[DATA_W-1] != a[DATA_W-1]);
        flags_we = '{z: 1'b1, c: 1'b1, n: 1'b1, o: 1'b1};
      end
      ALU_SUB: begin
        wide     = {1'b0, a} - {1'b0, b};   // top bit is the borrow
        ovf      = (a[DATA_W-1] != b[DATA_W-1]) && (wide[DATA_W-1] != a[DATA_W-1]);
        flags_we = '{z: 1'b1, c: 1'b1, n: 1'b1, o: 1'b1};
      end
      ALU_NEG: begin
        wide     = {(DATA_W+1){1'b0}} - {1'b0, a};
        ovf      = (a == {1'b1, {(DATA_W-1){1'b0}}});
        flags_we = '{z: 1'b1, c: 1'b1, n: 1'b1, o: 1'b1};
      end
      ALU_RLC: begin
        wide     = {a, carry_in};                      // a[7] leaves as carry
        flags_we = '{z: 1'b1, c: 1'b1, n: 1'b1, o: 1'b0};
      end
      ALU_RRC: begin
        wide     = {a[0], carry_in, a[DATA_W-1:1]};    // a[0] leaves as carry
        flags_we = '{z: 1'b1, c: 1'b1, n: 1'b1, o: 1'b0};
      end
      default: wide = {1'b0, a};
    endcase
    result = wide[DATA_W-1:0];
    flags  = '{z: (wide[DATA_W-1:0] == '0), c: wide[DATA_W], n: wide[DATA_W-1], o: ovf};
  end

endmodule
