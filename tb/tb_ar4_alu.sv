// tb_ar4_alu: self-checking test of the AR4 ALU.
// Every operation is driven with random operands and carry and compared with
// a reference computed here in plain integer arithmetic: result, the written
// flags and the write mask.
module tb_ar4_alu;
  import ar4_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, result;
  logic       carry_in;
  flags_t     flags, flags_we;
  int checks = 0, failures = 0;

  ar4_alu dut (.op, .a, .b, .carry_in, .result, .flags, .flags_we);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input alu_op_e o, input logic [7:0] x, input logic [7:0] y, input logic ci);
    int ia, ib, sa, sb, r, sr;
    logic [7:0] er;
    logic ez, ec, en, eo;
    logic [3:0] emask;
    op = o; a = x; b = y; carry_in = ci;
    #1;
    ia = int'(x); ib = int'(y);
    sa = (ia > 127) ? ia - 256 : ia;
    sb = (ib > 127) ? ib - 256 : ib;
    ec = 1'b0; eo = 1'b0; emask = 4'b1010;
    case (o)
      ALU_AND: r = ia & ib;
      ALU_OR:  r = ia | ib;
      ALU_XOR: r = ia ^ ib;
      ALU_NOT: r = 255 - ia;
      ALU_ADDC: begin
        r = ia + ib + int'(ci);
        ec = (r > 255); sr = sa + sb + int'(ci); eo = (sr > 127 || sr < -128);
        emask = 4'b1111;
      end
      ALU_SUB: begin
        r = (ia - ib) & 255;
        ec = (ia < ib); sr = sa - sb; eo = (sr > 127 || sr < -128);
        emask = 4'b1111;
      end
      ALU_NEG: begin
        r = (256 - ia) & 255;
        ec = (ia != 0); eo = (ia == 128);
        emask = 4'b1111;
      end
      ALU_RLC: begin
        r = ((ia << 1) & 255) | int'(ci); ec = x[7]; emask = 4'b1110;
      end
      default: begin // RRC
        r = (ia >> 1) | (int'(ci) << 7); ec = x[0]; emask = 4'b1110;
      end
    endcase
    er = r[7:0];
    en = er[7];
    ez = (er == 8'h00);
    checks++;
    if (result !== er || flags_we !== emask ||
        (emask[3] && flags.z !== ez) || (emask[2] && flags.c !== ec) ||
        (emask[1] && flags.n !== en) || (emask[0] && flags.o !== eo)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h ci=%b: got %h %b/%b, want %h %b%b%b%b/%b",
               o.name(), x, y, ci, result, flags, flags_we, er, ez, ec, en, eo, emask);
    end
  endtask

  initial begin
    alu_op_e ops [9] = '{ALU_AND, ALU_OR, ALU_XOR, ALU_ADDC, ALU_SUB,
                         ALU_NEG, ALU_NOT, ALU_RLC, ALU_RRC};
    foreach (ops[i]) begin
      // corner values
      check(ops[i], 8'h00, 8'h00, 1'b0);
      check(ops[i], 8'hFF, 8'h01, 1'b1);
      check(ops[i], 8'h7F, 8'h01, 1'b0);
      check(ops[i], 8'h80, 8'h01, 1'b0);
      check(ops[i], 8'h80, 8'h80, 1'b1);
      for (int k = 0; k < 500; k++)
        check(ops[i], 8'($urandom), 8'($urandom), 1'($urandom));
    end
    // a few worked examples
    check(ALU_ADDC, 8'd25, 8'd244, 1'b0); // 25 + 244 = 269 -> 13, carry
    check(ALU_SUB, 8'd2, 8'd3, 1'b0);     // borrow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
