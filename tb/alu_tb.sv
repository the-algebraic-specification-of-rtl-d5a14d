// alu_tb: drives every operation of the alu with directed corner cases and
// random operands and compares with values computed here from the
// definitions (unsigned, results cut to 32 bits, compares give 0 for true and
// all ones for false). The alu is combinational: outputs are sampled 1 ns
// after the inputs change.
module alu_tb;
  import amp_pkg::*;

  op_e   op;
  word_t a, b, y;
  int    checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t expect_y(op_e o, word_t x, word_t z);
    longint unsigned p;
    case (o)
      OP_ADD, OP_LD, OP_ST: return word_t'({32'd0, x} + {32'd0, z});
      OP_MULT: begin p = longint'(x) * longint'(z); return p[31:0]; end
      OP_AND:  return x & z;
      OP_OR:   return x | z;
      OP_NOT:  return x ^ 32'hFFFF_FFFF;
      OP_SLL: begin
        p = longint'(x);
        for (int i = 0; i < 40 && i < int'(z > 40 ? 40 : z); i++) p = p << 1;
        return p[31:0];
      end
      OP_EQ:   return (x == z) ? 32'h0 : 32'hFFFF_FFFF;
      OP_GT:   return (x > z) ? 32'h0 : 32'hFFFF_FFFF;
      default: return 32'h0;
    endcase
  endfunction

  task automatic check(op_e o, word_t x, word_t z);
    word_t e;
    op = o; a = x; b = z;
    #1;
    e = expect_y(o, x, z);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h expected %h", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases, including the reference program's values
    check(OP_ADD,  32'd5, 32'd5);           // 10
    check(OP_MULT, 32'd5, 32'd5);           // 25
    check(OP_SLL,  32'd5, 32'd5);           // 160
    check(OP_AND,  32'd5, 32'd5);
    check(OP_OR,   32'd5, 32'd5);
    check(OP_NOT,  32'd5, 32'd0);
    check(OP_EQ,   32'd25, 32'd5);          // false: all ones
    check(OP_GT,   32'd25, 32'd5);          // true: 0
    check(OP_GT,   32'd5, 32'd25);
    check(OP_GT,   32'd7, 32'd7);
    check(OP_EQ,   32'd7, 32'd7);
    check(OP_ADD,  32'hFFFF_FFFF, 32'd1);   // wraps to 0
    check(OP_MULT, 32'h0001_0000, 32'h0001_0000);
    check(OP_SLL,  32'h1, 32'd31);
    check(OP_SLL,  32'h1, 32'd32);
    check(OP_SLL,  32'hFFFF_FFFF, 32'h1_0000);
    check(OP_GT,   32'h8000_0000, 32'h7FFF_FFFF); // unsigned
    check(OP_JMP,  32'd3, 32'd4);
    check(OP_NOP,  32'd3, 32'd4);
    for (int i = 0; i < 2000; i++) begin
      op_e o;
      word_t x, z;
      o = op_e'($urandom_range(0, 11));
      x = $urandom;
      z = ($urandom_range(0, 3) == 0) ? word_t'($urandom_range(0, 40)) : $urandom;
      if ($urandom_range(0, 7) == 0) z = x;
      check(o, x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
