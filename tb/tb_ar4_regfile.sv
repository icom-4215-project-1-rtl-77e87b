// tb_ar4_regfile: self-checking test of the AR4 register file.
// Random writes and reads against a model array; checks reset to zero, the
// read port, the dedicated R7 port and the regs display bus.
module tb_ar4_regfile;
  logic clk = 0, rst = 1, we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata, r7;
  logic [7:0][7:0] regs;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  ar4_regfile dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata, .r7, .regs);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int r = 0; r < 8; r++) begin
      raddr = 3'(r);
      #1;
      checks++;
      if (rdata !== model[r] || regs[r] !== model[r]) begin
        failures++;
        $display("FAIL R%0d: rdata %h regs %h want %h", r, rdata, regs[r], model[r]);
      end
    end
    checks++;
    if (r7 !== model[7]) begin failures++; $display("FAIL r7 %h want %h", r7, model[7]); end
  endtask

  initial begin
    foreach (model[i]) model[i] = 8'h00;
    repeat (2) @(negedge clk);
    rst = 0;
    compare();
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 8'($urandom);
      @(negedge clk);
      if (we) model[waddr] = wdata;
      we = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
