// ar4_acc: the 8-bit accumulator A of the RISC AR4 and its input selector.
//
// When load is 1 the accumulator takes, at the clock edge, the value chosen by
// src: the ALU result, the MAC result, register f (LDA rf), the memory byte
// (LDA addr) or the instruction's immediate operand (LDI). Otherwise it holds.
// The accumulator and its sources follow the instruction set; the reset to
// zero is this design's choice.
module ar4_acc
  import ar4_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  acc_src_e          src,
  input  logic [DATA_W-1:0] alu_res,
  input  logic [DATA_W-1:0] mac_res,
  input  logic [DATA_W-1:0] reg_data,
  input  logic [DATA_W-1:0] mem_data,
  input  logic [DATA_W-1:0] imm,
  output logic [DATA_W-1:0] a
);

  logic [DATA_W-1:0] d;

  always_comb begin
    unique case (src)
      ASRC_ALU: d = alu_res;
      ASRC_MAC: d = mac_res;
      ASRC_REG: d = reg_data;
      ASRC_MEM: d = mem_data;
      ASRC_IMM: d = imm;
      default:  d = a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)       a <= '0;
    else if (load) a <= d;
  end

endmodule
