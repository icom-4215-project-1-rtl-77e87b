// tb_ar4_ir: self-checking test of the AR4 instruction register.
// Loads random instructions byte by byte (high byte first, as stored in
// memory) and checks the 16-bit value and the opcode, register f and operand
// fields; also checks that each byte load leaves the other byte alone.
module tb_ar4_ir;
  import ar4_pkg::*;
  logic clk = 0, rst = 1, load_hi = 0, load_lo = 0;
  logic [7:0] d = 0, operand;
  logic [15:0] ir;
  opcode_e opcode;
  logic [2:0] rf;
  int checks = 0, failures = 0;

  ar4_ir dut (.clk, .rst, .load_hi, .load_lo, .d, .ir, .opcode, .rf, .operand);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ir(input logic [15:0] w);
    checks++;
    if (ir !== w || 5'(opcode) !== w[15:11] || rf !== w[10:8] || operand !== w[7:0]) begin
      failures++;
      $display("FAIL ir=%h op=%b rf=%0d opnd=%h, want %h", ir, opcode, rf, operand, w);
    end
  endtask

  initial begin
    logic [15:0] w, prev;
    repeat (2) @(negedge clk);
    rst = 0;
    expect_ir(16'h0000);
    prev = 16'h0000;
    // the example program's first instruction: LDI 0x19
    load_hi = 1; d = 8'h70; @(negedge clk); load_hi = 0;
    expect_ir({8'h70, prev[7:0]});
    load_lo = 1; d = 8'h19; @(negedge clk); load_lo = 0;
    expect_ir(16'h7019);
    checks++;
    if (opcode != OP_LDI) begin failures++; $display("FAIL LDI decode"); end
    prev = 16'h7019;
    for (int k = 0; k < 300; k++) begin
      w = 16'($urandom);
      load_hi = 1; d = w[15:8]; @(negedge clk); load_hi = 0;
      expect_ir({w[15:8], prev[7:0]});
      d = 8'($urandom); @(negedge clk);          // no load: holds
      expect_ir({w[15:8], prev[7:0]});
      load_lo = 1; d = w[7:0]; @(negedge clk); load_lo = 0;
      expect_ir(w);
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
