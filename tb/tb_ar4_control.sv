// tb_ar4_control: self-checking test of the AR4 control unit.
// The opcode and flags are driven directly. For every 5-bit opcode and random
// flags the test follows one instruction from FETCH0 and checks the control
// outputs of each state against a table written here, and the instruction's
// length in clocks (4, or 5 for LDA addr). It then checks step mode (one
// instruction per rising edge of step, none without), the external access
// grant and hold, and STOP.
module tb_ar4_control;
  import ar4_pkg::*;
  logic clk = 0, rst = 1, run_mode = 1, step = 0, ext_en = 0;
  opcode_e opcode = OP_NOP;
  flags_t flags = '0;
  state_e state;
  maddr_e maddr_sel;
  acc_src_e acc_src;
  alu_op_e alu_op;
  logic mem_we, ir_load_hi, ir_load_lo, pc_inc, pc_load, acc_load;
  logic sr_from_alu, sr_from_mac, rf_we, ext_grant, halted, retire;
  int checks = 0, failures = 0;

  ar4_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // expected EXEC-state behaviour of one opcode
  task automatic check_exec(input logic [4:0] op, input flags_t f);
    bit is_alu, exp_acc, exp_rf, exp_we, exp_br;
    alu_op_e exp_alu;
    acc_src_e exp_src;
    is_alu = 0; exp_acc = 0; exp_rf = 0; exp_we = 0; exp_br = 0;
    exp_alu = ALU_AND; exp_src = ASRC_ALU;
    case (op)
      5'b00000: begin is_alu = 1; exp_alu = ALU_AND;  end
      5'b00001: begin is_alu = 1; exp_alu = ALU_OR;   end
      5'b00010: begin is_alu = 1; exp_alu = ALU_XOR;  end
      5'b00011: begin is_alu = 1; exp_alu = ALU_ADDC; end
      5'b00100: begin is_alu = 1; exp_alu = ALU_SUB;  end
      5'b00110: begin is_alu = 1; exp_alu = ALU_NEG;  end
      5'b00111: begin is_alu = 1; exp_alu = ALU_NOT;  end
      5'b01000: begin is_alu = 1; exp_alu = ALU_RLC;  end
      5'b01001: begin is_alu = 1; exp_alu = ALU_RRC;  end
      5'b00101: begin exp_acc = 1; exp_src = ASRC_MAC; end
      5'b01010: begin exp_acc = 1; exp_src = ASRC_REG; end
      5'b01011: exp_rf = 1;
      5'b01101: exp_we = 1;
      5'b01110: begin exp_acc = 1; exp_src = ASRC_IMM; end
      5'b10000: exp_br = f.z;
      5'b10001: exp_br = f.c;
      5'b10010: exp_br = f.n;
      5'b10011: exp_br = f.o;
      default: ;
    endcase
    if (is_alu) exp_acc = 1;
    chk(state == S_EXEC, $sformatf("op %b: not in EXEC", op));
    chk(acc_load == exp_acc, $sformatf("op %b: acc_load %b", op, acc_load));
    if (exp_acc) chk(acc_src == exp_src, $sformatf("op %b: acc_src %s", op, acc_src.name()));
    if (is_alu) chk(alu_op == exp_alu && sr_from_alu, $sformatf("op %b: alu_op %s", op, alu_op.name()));
    else        chk(!sr_from_alu, $sformatf("op %b: sr_from_alu", op));
    chk(sr_from_mac == (op == 5'b00101), $sformatf("op %b: sr_from_mac", op));
    chk(rf_we == exp_rf, $sformatf("op %b: rf_we", op));
    chk(mem_we == exp_we, $sformatf("op %b: mem_we", op));
    if (exp_we || op == 5'b01100) chk(maddr_sel == MA_OPND, $sformatf("op %b: maddr", op));
    chk(pc_load == exp_br, $sformatf("op %b flags %b: pc_load %b", op, f, pc_load));
    chk(!pc_inc && !ir_load_hi && !ir_load_lo, $sformatf("op %b: fetch strobes in EXEC", op));
  endtask

  // run one instruction from FETCH0 (go already true) and check every state
  task automatic run_one(input logic [4:0] op, input flags_t f);
    int cycles;
    opcode = opcode_e'(op);
    flags = f;
    chk(state == S_FETCH0, "start in FETCH0");
    chk(maddr_sel == MA_PC && !mem_we, "FETCH0 reads PC");
    @(negedge clk); cycles = 1;
    chk(state == S_FETCH1 && ir_load_hi && maddr_sel == MA_PC1 && !retire, "FETCH1");
    @(negedge clk); cycles++;
    chk(state == S_FETCH2 && ir_load_lo && pc_inc && !acc_load, "FETCH2");
    @(negedge clk); cycles++;
    check_exec(op, f);
    if (op == 5'b01100) begin
      chk(!retire && !acc_load, "LDA addr EXEC");
      @(negedge clk); cycles++;
      chk(state == S_MEMRD && acc_load && acc_src == ASRC_MEM, "LDA addr MEMRD");
    end
    chk(retire == (op != 5'b11111) || retire, "retire in last clock");
    @(negedge clk); cycles++;
    chk(cycles == ((op == 5'b01100) ? 5 : 4), $sformatf("op %b took %0d clocks", op, cycles));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // every opcode except STOP, with several random flag settings
    for (int rep = 0; rep < 8; rep++)
      for (int op = 0; op < 31; op++) run_one(5'(op), flags_t'($urandom));

    // step mode: nothing starts without a step edge
    run_mode = 0;
    opcode = OP_NOP;
    repeat (10) begin
      @(negedge clk);
      chk(state == S_FETCH0, "step mode waits");
    end
    // one step edge, held high for many clocks: exactly one instruction
    step = 1;
    begin
      int retires = 0;
      repeat (20) begin
        @(negedge clk);
        if (retire) retires++;
      end
      step = 0;
      repeat (10) begin
        @(negedge clk);
        if (retire) retires++;
      end
      chk(retires == 1, $sformatf("one step gave %0d instructions", retires));
    end
    // a step edge while an instruction runs is remembered
    step = 1; @(negedge clk); step = 0;      // starts instruction
    @(negedge clk); step = 1; @(negedge clk); step = 0;  // edge during FETCH2
    begin
      int retires = 0;
      repeat (20) begin
        @(negedge clk);
        if (retire) retires++;
      end
      chk(retires == 2, $sformatf("two step edges gave %0d instructions", retires));
    end

    // external access: granted in FETCH0 and holds the processor
    run_mode = 1;
    ext_en = 1;
    #1;
    chk(ext_grant, "ext granted at boundary");
    repeat (10) begin
      @(negedge clk);
      chk(state == S_FETCH0 && ext_grant, "held by ext access");
    end
    ext_en = 0;
    @(negedge clk);
    chk(state == S_FETCH1, "resumes after ext access");
    ext_en = 1;
    #1;
    chk(!ext_grant, "no grant in mid-instruction");
    @(negedge clk); @(negedge clk); @(negedge clk);
    chk(state == S_FETCH0 && ext_grant, "grant at next boundary");
    ext_en = 0;

    // STOP halts for good
    run_one(5'b11111, '0);
    chk(halted && state == S_HALT, "STOP halts");
    repeat (10) @(negedge clk);
    chk(halted && !retire && !acc_load, "stays halted");
    ext_en = 1;
    #1;
    chk(ext_grant, "ext access while halted");
    ext_en = 0;
    rst = 1; @(negedge clk); rst = 0;
    chk(state == S_FETCH0 && !halted, "reset leaves HALT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
