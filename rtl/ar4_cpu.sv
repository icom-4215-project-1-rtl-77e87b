// ar4_cpu: the RISC AR4 processor, top level.
//
// An 8-bit accumulator processor with 16-bit instructions, a 256-byte memory
// holding both program and data, eight general purpose registers, a 4-bit ZCNO
// status register, an ALU, a 4-bit multiply-accumulate unit and two
// memory-mapped devices (keyboard at 250-251, four-character display at
// 252-255). After reset it fetches from address 0; each instruction takes
// four clocks, LDA addr five, and STOP halts it until the next reset.
//
// Interface
//   run_mode, step   run_mode = 1 runs freely; run_mode = 0 executes one
//                    instruction per rising edge of step.
//   ext_*            a port for loading a program and inspecting memory. While
//                    ext_en is 1 the processor holds at the next instruction
//                    boundary and ext_grant goes to 1; from then on each clock
//                    performs one access: a write of ext_wdata when ext_we is
//                    1, or a read whose byte appears on ext_rdata one clock
//                    later. The memory is not cleared by reset, so a program
//                    can be loaded while rst is held.
//   kbd, display     the two devices.
//   dbg_*            the programmer-visible state (PC, IR, A, SR, R0..R7)
//                    and the control unit's state.
//   halted, retire   STOP reached; one pulse per completed instruction.
//
// The blocks and their roles follow the processor description; the
// cycle-level organisation, the external access port and the debug outputs
// are this design's choices.
module ar4_cpu
  import ar4_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          run_mode,
  input  logic                          step,
  input  logic                          ext_en,
  input  logic                          ext_we,
  input  logic [ADDR_W-1:0]             ext_addr,
  input  logic [DATA_W-1:0]             ext_wdata,
  output logic [DATA_W-1:0]             ext_rdata,
  output logic                          ext_grant,
  input  logic [15:0]                   kbd,
  output logic [3:0][DATA_W-1:0]        display,
  output logic                          halted,
  output logic                          retire,
  output logic [ADDR_W-1:0]             dbg_pc,
  output logic [INSTR_W-1:0]            dbg_ir,
  output logic [DATA_W-1:0]             dbg_a,
  output flags_t                        dbg_sr,
  output logic [NREGS-1:0][DATA_W-1:0]  dbg_regs,
  output state_e                        dbg_state
);

  // control
  state_e   state;
  maddr_e   maddr_sel;
  acc_src_e acc_src;
  alu_op_e  alu_op;
  logic     ctl_mem_we, ir_load_hi, ir_load_lo, pc_inc, pc_load, acc_load;
  logic     sr_from_alu, sr_from_mac, rf_we;

  // datapath
  logic [ADDR_W-1:0] pc, pc_next1;
  logic [INSTR_W-1:0] ir;
  opcode_e           opcode;
  logic [REG_AW-1:0] rf;
  logic [DATA_W-1:0] operand;
  logic [DATA_W-1:0] a, reg_data, r7, alu_res, mac_res;
  flags_t            sr, alu_flags, alu_we, mac_flags, mac_we, sr_d, sr_we;

  // memory bus
  logic [ADDR_W-1:0] bus_addr;
  logic [DATA_W-1:0] bus_wdata, bus_rdata, mem_rdata;
  logic              bus_we, mem_we;

  ar4_control u_control (
    .clk, .rst, .run_mode, .step, .ext_en,
    .opcode, .flags(sr),
    .state, .maddr_sel, .mem_we(ctl_mem_we), .ir_load_hi, .ir_load_lo,
    .pc_inc, .pc_load, .acc_load, .acc_src, .alu_op,
    .sr_from_alu, .sr_from_mac, .rf_we, .ext_grant, .halted, .retire
  );

  ar4_pc u_pc (
    .clk, .rst, .inc(pc_inc), .load(pc_load), .target(r7), .pc, .pc_next1
  );

  ar4_ir u_ir (
    .clk, .rst, .load_hi(ir_load_hi), .load_lo(ir_load_lo), .d(bus_rdata),
    .ir, .opcode, .rf, .operand
  );

  ar4_regfile u_regfile (
    .clk, .rst, .we(rf_we), .waddr(rf), .wdata(a), .raddr(rf),
    .rdata(reg_data), .r7, .regs(dbg_regs)
  );

  ar4_alu u_alu (
    .op(alu_op), .a, .b(reg_data), .carry_in(sr.c),
    .result(alu_res), .flags(alu_flags), .flags_we(alu_we)
  );

  ar4_mac u_mac (
    .a(a[3:0]), .b(reg_data), .result(mac_res), .flags(mac_flags), .flags_we(mac_we)
  );

  ar4_acc u_acc (
    .clk, .rst, .load(acc_load), .src(acc_src), .alu_res, .mac_res,
    .reg_data, .mem_data(bus_rdata), .imm(operand), .a
  );

  always_comb begin
    sr_d  = sr_from_mac ? mac_flags : alu_flags;
    sr_we = sr_from_alu ? alu_we : sr_from_mac ? mac_we : '0;
  end

  ar4_sr u_sr (.clk, .rst, .we(sr_we), .d(sr_d), .q(sr));

  // memory bus: the external port while granted, otherwise the processor
  always_comb begin
    if (ext_grant) begin
      bus_addr  = ext_addr;
      bus_we    = ext_we;
      bus_wdata = ext_wdata;
    end else begin
      unique case (maddr_sel)
        MA_PC1:  bus_addr = pc_next1;
        MA_OPND: bus_addr = operand;
        default: bus_addr = pc;
      endcase
      bus_we    = ctl_mem_we;
      bus_wdata = a;
    end
  end

  ar4_io u_io (
    .clk, .rst, .addr(bus_addr), .we(bus_we), .wdata(bus_wdata),
    .rdata(bus_rdata), .mem_we, .mem_rdata, .kbd, .display
  );

  ar4_memory #(.DEPTH(256), .WIDTH(DATA_W)) u_memory (
    .clk, .we(mem_we), .addr(bus_addr), .wdata(bus_wdata), .rdata(mem_rdata)
  );

  assign ext_rdata = bus_rdata;
  assign dbg_pc    = pc;
  assign dbg_ir    = ir;
  assign dbg_a     = a;
  assign dbg_sr    = sr;
  assign dbg_state = state;

endmodule
