// tb_ar4_memory: self-checking test of the 256-byte AR4 memory.
// Fills every address with a random byte, keeping a copy, then reads them all
// back in random order and checks the one-clock read latency and the
// read-before-write behaviour of a simultaneous write.
module tb_ar4_memory;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  ar4_memory dut (.clk, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'($urandom);
      we = 1; addr = 8'(i); wdata = model[i];
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 1000; k++) begin
      addr = 8'($urandom);
      @(negedge clk);            // one clock later the byte is out
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL read %h: got %h want %h", addr, rdata, model[addr]);
      end
    end
    // write and read the same address: old data comes out, new data is stored
    addr = 8'h42; wdata = ~model[8'h42]; we = 1;
    @(negedge clk);
    checks++;
    if (rdata !== model[8'h42]) begin failures++; $display("FAIL read-before-write"); end
    we = 0;
    @(negedge clk);
    checks++;
    if (rdata !== ~model[8'h42]) begin failures++; $display("FAIL write not stored"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
