// tb_ar4_cpu: end-to-end test of the RISC AR4 processor at its default size.
//
// A reference model of the instruction set, written here independently of the
// RTL, executes the same program as the processor. After every instruction
// the processor retires, the model executes one instruction and the
// programmer-visible state (PC, A, SR, R0..R7, display) is compared; at the
// end of each program the whole memory is read back through the external
// port and compared too.
//
// Programs:
//   1. the example program of the processor description (hand-checked result:
//      A = 0x41, memory[0x80] = 0x28, R1 = 0x19, R2 = 0xF4, R3 = 0x02,
//      R7 = 0x28);
//   2. a short program that reads the keyboard and writes the display;
//   3. many random programs, part of them run in step mode and with external
//      memory reads injected while the processor runs.
// Each mechanism of the design (every instruction, taken and untaken
// branches, carry and overflow, keyboard reads, display writes, step-mode
// waits, external-access holds, STOP) is counted and must occur at least once.
// In run mode with no external access, each instruction must take 4 clocks
// (5 for LDA addr).
module tb_ar4_cpu;
  import ar4_pkg::*;

  logic clk = 0, rst = 1, run_mode = 1, step = 0;
  logic ext_en = 0, ext_we = 0, ext_grant;
  logic [7:0] ext_addr = 0, ext_wdata = 0, ext_rdata;
  logic [15:0] kbd = 16'h4241;
  logic [3:0][7:0] display;
  logic halted, retire;
  logic [7:0] dbg_pc, dbg_a;
  logic [15:0] dbg_ir;
  flags_t dbg_sr;
  logic [7:0][7:0] dbg_regs;
  state_e dbg_state;

  ar4_cpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- model
  logic [7:0] m_mem [256];
  logic [7:0] m_reg [8];
  logic [7:0] m_disp [4];
  logic [7:0] m_a, m_pc;
  bit m_z, m_c, m_n, m_o, m_halt;

  // mechanism counters
  int op_count [32];
  int n_br_taken, n_br_not, n_carry, n_ovf, n_kbd, n_disp, n_step_wait, n_ext_hold, n_halt;

  function automatic logic [7:0] m_read(input logic [7:0] addr);
    if (addr == 8'd250) return kbd[15:8];
    if (addr == 8'd251) return kbd[7:0];
    if (addr >= 8'd252) return m_disp[addr - 8'd252];
    return m_mem[addr];
  endfunction

  function automatic void m_write(input logic [7:0] addr, input logic [7:0] v);
    if (addr >= 8'd252) m_disp[addr - 8'd252] = v;
    else if (addr < 8'd250) m_mem[addr] = v;
  endfunction

  function automatic void m_zn(input int r);
    m_z = ((r & 255) == 0);
    m_n = ((r & 128) != 0);
  endfunction

  function automatic int sgn(input logic [7:0] v);
    return (int'(v) > 127) ? int'(v) - 256 : int'(v);
  endfunction

  function automatic void m_reset();
    foreach (m_reg[i]) m_reg[i] = 8'h00;
    foreach (m_disp[i]) m_disp[i] = 8'h20;
    m_a = 0; m_pc = 0;
    {m_z, m_c, m_n, m_o} = 4'b0000;
    m_halt = 0;
  endfunction

  // execute one instruction
  function automatic void m_step();
    logic [7:0] hi, lo, rv, adr;
    logic [4:0] op;
    int r, s, ia, ir;
    hi = m_read(m_pc);
    lo = m_read(8'(m_pc + 1));
    m_pc = 8'(m_pc + 2);
    op = hi[7:3];
    rv = m_reg[hi[2:0]];
    adr = lo;
    ia = int'(m_a); ir = int'(rv);
    op_count[op]++;
    case (op)
      5'd0: begin m_a = m_a & rv; m_zn(int'(m_a)); end
      5'd1: begin m_a = m_a | rv; m_zn(int'(m_a)); end
      5'd2: begin m_a = m_a ^ rv; m_zn(int'(m_a)); end
      5'd3: begin
        r = ia + ir + int'(m_c);
        s = sgn(m_a) + sgn(rv) + int'(m_c);
        m_c = (r > 255); m_o = (s > 127) || (s < -128);
        if (m_c) n_carry++;
        if (m_o) n_ovf++;
        m_a = 8'(r); m_zn(r);
      end
      5'd4: begin
        r = ia - ir;
        s = sgn(m_a) - sgn(rv);
        m_c = (r < 0); m_o = (s > 127) || (s < -128);
        if (m_o) n_ovf++;
        m_a = 8'(r); m_zn(r);
      end
      5'd5: begin
        r = (ia % 16) * (ir % 16) + ir;
        m_c = (r > 255);
        m_a = 8'(r); m_zn(r);
      end
      5'd6: begin
        r = 256 - ia;
        m_c = (ia != 0); m_o = (ia == 128);
        m_a = 8'(r); m_zn(r);
      end
      5'd7: begin m_a = ~m_a; m_zn(int'(m_a)); end
      5'd8: begin
        r = ia * 2 + int'(m_c);
        m_c = m_a[7]; m_a = 8'(r); m_zn(r);
      end
      5'd9: begin
        r = ia / 2 + (m_c ? 128 : 0);
        m_c = m_a[0]; m_a = 8'(r); m_zn(r);
      end
      5'd10: m_a = rv;
      5'd11: m_reg[hi[2:0]] = m_a;
      5'd12: begin
        if (adr == 8'd250 || adr == 8'd251) n_kbd++;
        m_a = m_read(adr);
      end
      5'd13: begin
        if (adr >= 8'd252) n_disp++;
        m_write(adr, m_a);
      end
      5'd14: m_a = lo;
      5'd16, 5'd17, 5'd18, 5'd19: begin
        bit t;
        t = (op == 5'd16) ? m_z : (op == 5'd17) ? m_c : (op == 5'd18) ? m_n : m_o;
        if (t) begin m_pc = m_reg[7]; n_br_taken++; end
        else n_br_not++;
      end
      5'd31: begin m_halt = 1; m_pc = 8'(m_pc); n_halt++; end
      default: ;   // NOP and unused opcodes
    endcase
  endfunction

  // ------------------------------------------------------------- compare
  bit checking = 0;
  bit timing_window = 0;
  int since_retire = 0;
  logic [4:0] last_op;

  always @(negedge clk) begin
    if (checking) begin
      since_retire++;
      if (retire) begin
        last_op = m_read(m_pc)[7:3];
        m_step();
        if (timing_window)
          chk(since_retire == ((last_op == 5'd12) ? 5 : 4),
              $sformatf("instruction %b took %0d clocks", last_op, since_retire));
        since_retire = 0;
        @(negedge clk);
        since_retire++;
        compare_state();
      end
    end
  end

  task automatic compare_state();
    chk(dbg_pc === m_pc, $sformatf("PC %h want %h", dbg_pc, m_pc));
    chk(dbg_a === m_a, $sformatf("A %h want %h (pc %h)", dbg_a, m_a, m_pc));
    chk(dbg_sr === {m_z, m_c, m_n, m_o}, $sformatf("SR %b want %b%b%b%b", dbg_sr, m_z, m_c, m_n, m_o));
    for (int i = 0; i < 8; i++)
      chk(dbg_regs[i] === m_reg[i], $sformatf("R%0d %h want %h", i, dbg_regs[i], m_reg[i]));
    for (int i = 0; i < 4; i++)
      chk(display[i] === m_disp[i], $sformatf("display[%0d] %h want %h", i, display[i], m_disp[i]));
    chk(halted === m_halt, "halted");
  endtask

  // ------------------------------------------------------ external port
  // write one byte; call with ext_en already granted
  task automatic ext_write(input logic [7:0] addr, input logic [7:0] v);
    ext_we = 1; ext_addr = addr; ext_wdata = v;
    @(negedge clk);
    ext_we = 0;
  endtask

  task automatic ext_read(input logic [7:0] addr, output logic [7:0] v);
    ext_we = 0; ext_addr = addr;
    @(negedge clk);
    v = ext_rdata;
  endtask

  // load a program (list of 16-bit words, big-endian) under reset
  task automatic load_program(input logic [15:0] words [$], input bit fill_random);
    checking = 0;
    rst = 1; ext_en = 1;
    @(negedge clk); @(negedge clk);
    chk(ext_grant, "grant under reset");
    for (int i = 0; i < 250; i++) begin
      logic [7:0] v;
      v = fill_random ? 8'($urandom) : 8'h00;
      if (i < 2 * words.size()) v = (i % 2 == 0) ? words[i/2][15:8] : words[i/2][7:0];
      ext_write(8'(i), v);
      m_mem[i] = v;
    end
    m_reset();
    ext_en = 0;
    rst = 0;
    since_retire = 0;
    checking = 1;
  endtask

  task automatic compare_memory();
    logic [7:0] v;
    ext_en = 1;
    @(negedge clk);
    chk(ext_grant, "grant when halted");
    for (int i = 0; i < 256; i++) begin
      ext_read(8'(i), v);
      chk(v === m_read(8'(i)), $sformatf("mem[%h] %h want %h", i, v, m_read(8'(i))));
    end
    ext_en = 0;
  endtask

  task automatic wait_halt(input int max_instr);
    int n = 0;
    while (!halted && n < max_instr * 6) begin
      @(negedge clk);
      n++;
    end
  endtask

  // random instruction word, biased to useful operands
  function automatic logic [15:0] rand_instr();
    logic [4:0] ops [22] = '{5'd0, 5'd1, 5'd2, 5'd3, 5'd4, 5'd5, 5'd6, 5'd7, 5'd8, 5'd9,
                             5'd10, 5'd11, 5'd12, 5'd13, 5'd14, 5'd16, 5'd17, 5'd18,
                             5'd19, 5'd24, 5'd21, 5'd3};
    logic [4:0] op;
    logic [2:0] rf;
    logic [7:0] lo;
    if ($urandom_range(0, 63) == 0) return 16'hF800;   // STOP
    op = ops[$urandom_range(0, 21)];
    rf = 3'($urandom);
    lo = 8'($urandom);
    if (op == 5'd12 || op == 5'd13)
      lo = ($urandom_range(0, 3) == 0) ? 8'($urandom_range(250, 255)) : 8'($urandom_range(128, 249));
    if (op == 5'd11 && rf == 3'd7 && $urandom_range(0, 1) == 0) rf = 3'd6;
    return {op, rf, lo};
  endfunction

  // ---------------------------------------------------------------- main
  initial begin
    logic [15:0] prog [$];
    logic [7:0] v;

    // 1. the example program
    prog = '{16'h7019, 16'h5900, 16'h70F4, 16'h5A00, 16'h7002, 16'h5B00,
             16'h7028, 16'h5F00, 16'h6880, 16'h1900, 16'hF800};
    timing_window = 1;
    load_program(prog, 0);
    wait_halt(20);
    @(negedge clk);
    chk(halted, "example program reaches STOP");
    chk(dbg_a === 8'h41, $sformatf("example: A=%h want 41", dbg_a));
    chk(dbg_regs[1] === 8'h19 && dbg_regs[2] === 8'hF4 && dbg_regs[3] === 8'h02 &&
        dbg_regs[7] === 8'h28, "example: registers");
    chk(dbg_pc === 8'd22, $sformatf("example: PC=%0d want 22", dbg_pc));
    checking = 0;
    ext_en = 1; @(negedge clk);
    ext_read(8'h80, v);
    chk(v === 8'h28, $sformatf("example: mem[80]=%h want 28", v));
    ext_en = 0;
    compare_memory();

    // 2. keyboard to display: LDA 250, STA 252, LDA 251, STA 253,
    //    LDI '!', STA 255, LDA 252 (read back), STOP
    kbd = 16'h4F4B;   // "OK"
    prog = '{16'h60FA, 16'h68FC, 16'h60FB, 16'h68FD, 16'h7021, 16'h68FF, 16'h60FC, 16'hF800};
    load_program(prog, 0);
    wait_halt(20);
    @(negedge clk);
    chk(display[0] === 8'h4F && display[1] === 8'h4B && display[2] === 8'h20 &&
        display[3] === 8'h21, $sformatf("display %h", display));
    chk(dbg_a === 8'h4F, "display read back");
    compare_memory();

    // 3. random programs
    for (int p = 0; p < 40; p++) begin
      prog.delete();
      for (int i = 0; i < 64; i++) prog.push_back(rand_instr());
      kbd = 16'($urandom);
      timing_window = (p % 4 == 0);
      run_mode = (p % 4 != 1);
      load_program(prog, 1);
      for (int cyc = 0; cyc < 6000 && !halted; cyc++) begin
        if (p % 4 == 1) begin
          // step mode: the processor waits in FETCH0 until stepped, then
          // runs exactly one instruction
          int wait_cycles, guard;
          wait_cycles = $urandom_range(1, 4);
          repeat (wait_cycles) begin
            @(negedge clk);
            n_step_wait++;
            chk(!retire && (dbg_state == S_FETCH0 || dbg_state == S_HALT), "step mode waits");
          end
          step = 1;
          @(negedge clk);
          step = 0;
          guard = 0;
          while (!retire && !halted && guard < 10) begin
            @(negedge clk);
            guard++;
          end
          @(negedge clk);
          chk(dbg_state == S_FETCH0 || halted, "one instruction per step");
        end else if (p % 4 == 2 && $urandom_range(0, 19) == 0) begin
          // external read while running
          ext_en = 1;
          @(negedge clk);
          while (!ext_grant) @(negedge clk);
          if (!halted) n_ext_hold++;
          ext_addr = 8'($urandom_range(0, 249));
          @(negedge clk);
          chk(ext_rdata === m_mem[ext_addr], "external read while running");
          chk(dbg_state == S_FETCH0 || halted, "processor held");
          ext_en = 0;
          @(negedge clk);
        end else begin
          @(negedge clk);
        end
        if (kbd[0] && $urandom_range(0, 99) == 0) kbd = 16'($urandom);
      end
      run_mode = 1;
      repeat (8) @(negedge clk);
      checking = 0;
      if (halted) compare_memory();
    end

    // every mechanism must have happened
    foreach (op_count[i])
      if (i inside {[0:14], [16:19], 24, 31})
        chk(op_count[i] > 0, $sformatf("opcode %b never executed", 5'(i)));
    chk(n_br_taken > 0, "no branch taken");
    chk(n_br_not > 0, "no branch untaken");
    chk(n_carry > 0, "no carry out");
    chk(n_ovf > 0, "no overflow");
    chk(n_kbd > 0, "no keyboard read");
    chk(n_disp > 0, "no display write");
    chk(n_step_wait > 0, "no step-mode wait");
    chk(n_ext_hold > 0, "no external-access hold");
    chk(n_halt > 0, "no STOP");
    $display("mechanisms: taken=%0d untaken=%0d carry=%0d ovf=%0d kbd=%0d disp=%0d step_wait=%0d ext_hold=%0d halt=%0d",
             n_br_taken, n_br_not, n_carry, n_ovf, n_kbd, n_disp, n_step_wait, n_ext_hold, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
