// ar4_sr: the 4-bit status register of the RISC AR4, laid out ZCNO
// (zero, carry, negative, overflow; Z in bit 3).
//
// At the clock edge each flag whose bit in we is 1 takes the matching bit of
// d; the other flags keep their value. The layout follows the processor
// description; the per-flag write enable and the reset to 0000 are this
// design's choices.
module ar4_sr
  import ar4_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  flags_t we,
  input  flags_t d,
  output flags_t q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= (d & we) | (q & ~we);
  end

endmodule
