// ar4_mac: the multiply-accumulate unit of the RISC AR4.
//
// Combinational. It multiplies the four least significant bits of the
// accumulator (port a) by the four least significant bits of register f (b) and adds
// the whole of register f: result = a[3:0] * b[3:0] + b, kept to 8 bits, as
// the MAC instruction defines it. The 4x4 multiplier gives an 8-bit product;
// the 8-bit adder's carry out becomes the C flag.
//
// The operation follows the instruction set; the flags it writes (Z, C, N,
// with O left alone) are this design's choice.
module ar4_mac
  import ar4_pkg::*;
(
  input  logic [3:0]        a,      // A[3:0]
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] result,
  output flags_t            flags,
  output flags_t            flags_we
);

  logic [7:0]      product;  // 4 x 4 bits
  logic [DATA_W:0] sum;

  always_comb begin
    product  = {4'b0, a} * {4'b0, b[3:0]};
    sum      = {1'b0, product} + {1'b0, b};
    result   = sum[DATA_W-1:0];
    flags    = '{z: (sum[DATA_W-1:0] == '0), c: sum[DATA_W], n: sum[DATA_W-1], o: 1'b0};
    flags_we = '{z: 1'b1, c: 1'b1, n: 1'b1, o: 1'b0};
  end

endmodule
