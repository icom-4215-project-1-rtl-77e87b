// tb_ar4_pc: self-checking test of the AR4 program counter.
// Checks the start at 0, the two-byte step, PC+1, the branch load and its
// priority over the step, and wrap-around at 256.
module tb_ar4_pc;
  logic clk = 0, rst = 1, inc = 0, load = 0;
  logic [7:0] target = 0, pc, pc_next1;
  logic [7:0] model;
  int checks = 0, failures = 0;

  ar4_pc dut (.clk, .rst, .inc, .load, .target, .pc, .pc_next1);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    model = 8'd0;
    for (int k = 0; k < 1000; k++) begin
      checks++;
      if (pc !== model || pc_next1 !== 8'(model + 1)) begin
        failures++;
        $display("FAIL pc=%0d pc+1=%0d want %0d", pc, pc_next1, model);
      end
      inc = (k < 200) ? 1'b1 : 1'($urandom);     // first 200: plain stepping, wraps
      load = (k < 200) ? 1'b0 : ($urandom_range(0, 3) == 0);
      target = 8'($urandom);
      @(negedge clk);
      if (load)     model = target;
      else if (inc) model = 8'(model + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
