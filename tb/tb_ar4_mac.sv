// tb_ar4_mac: self-checking test of the AR4 multiply-accumulate unit.
// All 16 x 256 combinations of A[3:0] and register f are compared with
// (A[3:0] * rf[3:0] + rf) mod 256 and its carry, zero and sign flags.
module tb_ar4_mac;
  import ar4_pkg::*;

  logic [3:0] a;
  logic [7:0] b, result;
  flags_t     flags, flags_we;
  int checks = 0, failures = 0;

  ar4_mac dut (.a, .b, .result, .flags, .flags_we);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 256; j++) begin
        a = 4'(i); b = 8'(j);
        #1;
        full = i * (j % 16) + j;
        checks++;
        if (result !== 8'(full) || flags.c !== (full > 255) ||
            flags.z !== ((full % 256) == 0) || flags.n !== ((full % 256) >= 128) ||
            flags_we !== 4'b1110) begin
          failures++;
          if (failures < 10)
            $display("FAIL a=%0d b=%0d: got %0d flags %b, want %0d", i, j, result, flags, full % 256);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
