// tb_ar4_step_hex: runs a program given as a hex file, in step mode.
//
// The file tb/ar4_example.hex holds one instruction per line as four hex
// digits, the format the AR4 tools use for programs. The testbench loads it
// high byte first from address 0 through the processor's external port, then
// single-steps it: after each step it prints PC, IR, A, SR and R0..R7, and
// checks that exactly one instruction ran and that the state matches values
// worked out by hand for the example program
//   LDI 0x19; STA R1; LDI 0xF4; STA R2; LDI 2; STA R3; LDI 0x28; STA R7;
//   STA 0x80; ADDC R1; STOP
// Between steps it also checks that the processor stays put.
module tb_ar4_step_hex;
  import ar4_pkg::*;

  logic clk = 0, rst = 1, run_mode = 0, step = 0;
  logic ext_en = 0, ext_we = 0, ext_grant;
  logic [7:0] ext_addr = 0, ext_wdata = 0, ext_rdata;
  logic [15:0] kbd = 16'h0000;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [15:0] prog [64];

  // expected after each step: A, the register written (or -1), its value
  logic [7:0] exp_a  [11] = '{8'h19, 8'h19, 8'hF4, 8'hF4, 8'h02, 8'h02, 8'h28, 8'h28, 8'h28, 8'h41, 8'h41};
  int         exp_r  [11] = '{-1, 1, -1, 2, -1, 3, -1, 7, -1, -1, -1};
  logic [7:0] exp_rv [11] = '{8'h00, 8'h19, 8'h00, 8'hF4, 8'h00, 8'h02, 8'h00, 8'h28, 8'h00, 8'h00, 8'h00};

  initial begin
    int n, retires;
    logic [7:0] v;
    foreach (prog[i]) prog[i] = 16'hFFFF;
    $readmemh("tb/ar4_example.hex", prog);
    n = 0;
    while (n < 64 && prog[n] != 16'hFFFF) n++;
    chk(n == 11, $sformatf("read %0d instructions from the file", n));

    // load under reset
    ext_en = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 2 * n; i++) begin
      ext_we = 1; ext_addr = 8'(i);
      ext_wdata = (i % 2 == 0) ? prog[i/2][15:8] : prog[i/2][7:0];
      @(negedge clk);
    end
    ext_we = 0; ext_en = 0; rst = 0;

    for (int s = 0; s < n; s++) begin
      // nothing happens without a step
      repeat (6) begin
        @(negedge clk);
        chk(!retire && dbg_pc == 8'(2 * s), "waits for step");
      end
      step = 1;
      retires = 0;
      repeat (8) begin
        @(negedge clk);
        if (retire) retires++;
      end
      step = 0;
      chk(retires == 1, $sformatf("step %0d ran %0d instructions", s, retires));
      $display("step %2d  PC=%h IR=%h A=%h SR=%b R=%h %h %h %h %h %h %h %h", s + 1,
               dbg_pc, dbg_ir, dbg_a, dbg_sr, dbg_regs[0], dbg_regs[1], dbg_regs[2],
               dbg_regs[3], dbg_regs[4], dbg_regs[5], dbg_regs[6], dbg_regs[7]);
      chk(dbg_ir === prog[s], $sformatf("IR %h want %h", dbg_ir, prog[s]));
      chk(dbg_pc === 8'(2 * s + 2), $sformatf("PC %0d want %0d", dbg_pc, 2 * s + 2));
      chk(dbg_a === exp_a[s], $sformatf("A %h want %h", dbg_a, exp_a[s]));
      if (exp_r[s] >= 0)
        chk(dbg_regs[exp_r[s]] === exp_rv[s], $sformatf("R%0d %h want %h", exp_r[s], dbg_regs[exp_r[s]], exp_rv[s]));
    end
    chk(halted, "STOP reached");
    chk(dbg_sr === 4'b0000, "ADDC 0x28 + 0x19 sets no flag");

    // mem[0x80] was written by STA 0x80
    ext_en = 1;
    @(negedge clk);
    ext_addr = 8'h80;
    @(negedge clk);
    v = ext_rdata;
    chk(v === 8'h28, $sformatf("mem[80]=%h want 28", v));
    ext_en = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
