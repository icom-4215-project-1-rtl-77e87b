// ar4_control: the control unit of the RISC AR4.
//
// A state machine that runs each instruction in four clocks (five for LDA
// addr), matched to a memory with a one-clock synchronous read:
//   FETCH0  wait until the processor may go, then read the byte at PC
//   FETCH1  store the high instruction byte, read PC+1
//   FETCH2  store the low byte, PC += 2
//   EXEC    decode the opcode and execute; LDA addr reads memory here
//   MEMRD   LDA addr only: load A with the byte read
// STOP moves the machine to HALT, where it stays until reset.
//
// Run and step modes: with run_mode = 1 the machine starts a new instruction
// whenever it reaches FETCH0, so a program runs from address 0 to its STOP.
// With run_mode = 0 it starts one instruction per rising edge of step; an edge
// that arrives while an instruction is running is remembered. An external
// memory access (ext_en) is granted only at an instruction boundary (in
// FETCH0 or HALT) and holds the processor in FETCH0 while it lasts.
// retire pulses in the last clock of each instruction. Assertions check the
// external-access and step rules.
//
// The instruction set, opcodes, fetch from address 0 and the branch on R7
// follow the processor description. The state sequence, the timing, the step
// and external-access handshakes, and treating unused opcodes as NOP are this
// design's choices.
module ar4_control
  import ar4_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     run_mode,
  input  logic     step,
  input  logic     ext_en,
  input  opcode_e  opcode,
  input  flags_t   flags,
  output state_e   state,
  output maddr_e   maddr_sel,
  output logic     mem_we,
  output logic     ir_load_hi,
  output logic     ir_load_lo,
  output logic     pc_inc,
  output logic     pc_load,
  output logic     acc_load,
  output acc_src_e acc_src,
  output alu_op_e  alu_op,
  output logic     sr_from_alu,
  output logic     sr_from_mac,
  output logic     rf_we,
  output logic     ext_grant,
  output logic     halted,
  output logic     retire
);

  state_e next;
  logic   step_q, step_pend, go;

  // A rising edge of step is kept until an instruction starts
  always_ff @(posedge clk) begin
    if (rst) begin
      step_q    <= 1'b0;
      step_pend <= 1'b0;
    end else begin
      step_q <= step;
      if (step && !step_q)                   step_pend <= 1'b1;
      else if (state == S_FETCH0 && go && !run_mode) step_pend <= 1'b0;
    end
  end

  assign go = !ext_en && (run_mode || step_pend);

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH0;
    else     state <= next;
  end

  always_comb begin
    next        = state;
    maddr_sel   = MA_PC;
    mem_we      = 1'b0;
    ir_load_hi  = 1'b0;
    ir_load_lo  = 1'b0;
    pc_inc      = 1'b0;
    pc_load     = 1'b0;
    acc_load    = 1'b0;
    acc_src     = ASRC_ALU;
    alu_op      = ALU_AND;
    sr_from_alu = 1'b0;
    sr_from_mac = 1'b0;
    rf_we       = 1'b0;
    ext_grant   = 1'b0;
    halted      = 1'b0;
    retire      = 1'b0;

    unique case (state)
      S_FETCH0: begin
        ext_grant = ext_en;
        if (go) next = S_FETCH1;
      end
      S_FETCH1: begin
        ir_load_hi = 1'b1;
        maddr_sel  = MA_PC1;
        next       = S_FETCH2;
      end
      S_FETCH2: begin
        ir_load_lo = 1'b1;
        pc_inc     = 1'b1;
        next       = S_EXEC;
      end
      S_EXEC: begin
        next   = S_FETCH0;
        retire = 1'b1;
        case (opcode)
          OP_AND, OP_OR, OP_XOR, OP_ADDC, OP_SUB,
          OP_NEG, OP_NOT, OP_RLC, OP_RRC: begin
            acc_load    = 1'b1;
            acc_src     = ASRC_ALU;
            sr_from_alu = 1'b1;
            case (opcode)
              OP_OR:   alu_op = ALU_OR;
              OP_XOR:  alu_op = ALU_XOR;
              OP_ADDC: alu_op = ALU_ADDC;
              OP_SUB:  alu_op = ALU_SUB;
              OP_NEG:  alu_op = ALU_NEG;
              OP_NOT:  alu_op = ALU_NOT;
              OP_RLC:  alu_op = ALU_RLC;
              OP_RRC:  alu_op = ALU_RRC;
              default: alu_op = ALU_AND;
            endcase
          end
          OP_MAC: begin
            acc_load    = 1'b1;
            acc_src     = ASRC_MAC;
            sr_from_mac = 1'b1;
          end
          OP_LDAR: begin
            acc_load = 1'b1;
            acc_src  = ASRC_REG;
          end
          OP_STAR: rf_we = 1'b1;
          OP_LDAM: begin
            maddr_sel = MA_OPND;
            retire    = 1'b0;
            next      = S_MEMRD;
          end
          OP_STAM: begin
            maddr_sel = MA_OPND;
            mem_we    = 1'b1;
          end
          OP_LDI: begin
            acc_load = 1'b1;
            acc_src  = ASRC_IMM;
          end
          OP_BRZ: pc_load = flags.z;
          OP_BRC: pc_load = flags.c;
          OP_BRN: pc_load = flags.n;
          OP_BRO: pc_load = flags.o;
          OP_STOP: next = S_HALT;
          default: ;  // NOP and unused opcodes
        endcase
      end
      S_MEMRD: begin
        acc_load = 1'b1;
        acc_src  = ASRC_MEM;
        retire   = 1'b1;
        next     = S_FETCH0;
      end
      S_HALT: begin
        halted    = 1'b1;
        ext_grant = ext_en;
      end
      default: next = S_FETCH0;
    endcase
  end

  // The external port gets the memory only at an instruction boundary
  a_grant_at_boundary: assert property (@(posedge clk) disable iff (rst)
    ext_grant |-> (state == S_FETCH0 || state == S_HALT));
  // The processor never drives the memory while the external port owns it
  a_no_cpu_write_when_granted: assert property (@(posedge clk) disable iff (rst)
    ext_grant |-> !mem_we);
  // An instruction starts only when allowed: run mode or a pending step
  a_start_allowed: assert property (@(posedge clk) disable iff (rst)
    (state == S_FETCH0 && next == S_FETCH1) |-> (run_mode || step_pend) && !ext_en);

endmodule
