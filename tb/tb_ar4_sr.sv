// tb_ar4_sr: self-checking test of the AR4 status register.
// Random flag values with random per-flag write enables; flags not enabled
// must keep their value.
module tb_ar4_sr;
  import ar4_pkg::*;
  logic clk = 0, rst = 1;
  flags_t we = '0, d = '0, q;
  logic [3:0] model;
  int checks = 0, failures = 0;

  ar4_sr dut (.clk, .rst, .we, .d, .q);

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
    model = 4'b0000;
    for (int k = 0; k < 500; k++) begin
      checks++;
      if (q !== model) begin failures++; $display("FAIL sr=%b want %b", q, model); end
      we = flags_t'($urandom); d = flags_t'($urandom);
      @(negedge clk);
      for (int b = 0; b < 4; b++) if (we[b]) model[b] = d[b];
    end
    // bit order ZCNO: Z is bit 3
    we = '{z: 1'b1, c: 1'b0, n: 1'b0, o: 1'b0}; d = '1;
    @(negedge clk);
    checks++;
    if (q[3] !== 1'b1 || q.z !== 1'b1) begin failures++; $display("FAIL Z position"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
