// tb_ar4_acc: self-checking test of the AR4 accumulator and its source
// selector. Each source is loaded with random data; the accumulator must take
// the selected one and hold its value when load is 0.
module tb_ar4_acc;
  import ar4_pkg::*;
  logic clk = 0, rst = 1, load = 0;
  acc_src_e src = ASRC_ALU;
  logic [7:0] alu_res = 0, mac_res = 0, reg_data = 0, mem_data = 0, imm = 0, a;
  logic [7:0] model;
  int checks = 0, failures = 0;

  ar4_acc dut (.clk, .rst, .load, .src, .alu_res, .mac_res, .reg_data, .mem_data, .imm, .a);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_src_e srcs [5] = '{ASRC_ALU, ASRC_MAC, ASRC_REG, ASRC_MEM, ASRC_IMM};
    logic [7:0] v [5];
    repeat (2) @(negedge clk);
    rst = 0;
    model = 8'h00;
    checks++;
    if (a !== 8'h00) begin failures++; $display("FAIL reset"); end
    for (int k = 0; k < 500; k++) begin
      foreach (v[i]) v[i] = 8'($urandom);
      alu_res = v[0]; mac_res = v[1]; reg_data = v[2]; mem_data = v[3]; imm = v[4];
      begin
        int s;
        s = int'($urandom_range(0, 4));
        src = srcs[s];
        load = 1'($urandom);
        @(negedge clk);
        if (load) model = v[s];
      end
      checks++;
      if (a !== model) begin
        failures++;
        $display("FAIL src=%s load=%b: a=%h want %h", src.name(), load, a, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
