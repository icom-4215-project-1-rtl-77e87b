// tb_ar4_io: self-checking test of the AR4 memory-mapped I/O.
// Checks the keyboard bytes at 250/251, display writes at 252..255 and their
// read-back, that writes to 250..255 never reach the memory, and that other
// addresses pass the memory's read data through.
module tb_ar4_io;
  logic clk = 0, rst = 1, we = 0, mem_we;
  logic [7:0] addr = 0, wdata = 0, rdata, mem_rdata = 0;
  logic [15:0] kbd = 0;
  logic [3:0][7:0] display;
  logic [7:0] disp_model [4];
  int checks = 0, failures = 0;

  ar4_io dut (.clk, .rst, .addr, .we, .wdata, .rdata, .mem_we, .mem_rdata, .kbd, .display);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [7:0] want;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (disp_model[i]) disp_model[i] = 8'h20;
    for (int k = 0; k < 1000; k++) begin
      addr = (k % 3 == 0) ? 8'($urandom_range(250, 255)) : 8'($urandom);
      we = 1'($urandom);
      wdata = 8'($urandom);
      kbd = 16'($urandom);
      #1;
      chk(mem_we === (we && addr < 250), "mem_we gating");
      if (addr == 250)      want = kbd[15:8];
      else if (addr == 251) want = kbd[7:0];
      else if (addr >= 252) want = disp_model[addr - 252];
      else                  want = 8'hxx;
      @(negedge clk);
      if (we && addr >= 252) disp_model[addr - 252] = wdata;
      mem_rdata = 8'($urandom);
      #1;
      if (addr >= 250) chk(rdata === want, $sformatf("device read %0d: %h want %h", addr, rdata, want));
      else             chk(rdata === mem_rdata, "memory read pass-through");
      for (int i = 0; i < 4; i++)
        chk(display[i] === disp_model[i], $sformatf("display[%0d]", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
