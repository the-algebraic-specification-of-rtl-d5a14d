// amp_tb_pkg: reference model and program builders for the testbenches.
//
// isa_model executes the instruction set one instruction at a time, written
// directly from the instruction definitions and independent of the RTL. A
// pipelined core with its interlock on must end in the same architectural
// state as this model (registers and data memory), since every instruction
// sees the results of all earlier ones.
//
// doc_program() builds the reference test program: loads, shift, store,
// arithmetic, logic, compares, a not-taken and a taken JMP to a subroutine
// at byte address base+252, a JMP back through the link register, and a
// final self-loop ("halt": JMP R0,R0,R17 with R17 holding its own address).
package amp_tb_pkg;
  import amp_pkg::*;

  typedef struct {
    word_t addr;   // byte address
    word_t data;
  } pm_word_t;

  class isa_model;
    word_t regs [NREGS];
    word_t dm   [word_t];
    word_t pm   [word_t];
    word_t pc;
    bit    pmp_map;        // 1: NOP = 0x00, ADD = 0x01; 0: ADD = 0x00
    word_t dmask;          // data memory address mask (2^DAW - 1)
    int unsigned executed;
    // expected one-cycle interlock bubbles of the pipelined core: the
    // instruction reads the register the one executed just before writes
    byte unsigned prev_dest;
    int unsigned  stalls;

    function new(bit pmp_map_i, int unsigned daw);
      pmp_map  = pmp_map_i;
      dmask    = (daw >= 32) ? '1 : ((word_t'(1) << daw) - 1);
      pc       = '0;
      executed = 0;
      prev_dest = 0;
      stalls = 0;
      foreach (regs[i]) regs[i] = '0;
    endfunction

    function word_t r(field_t n);
      return (n == 0) ? '0 : regs[n];
    endfunction

    function void w(field_t n, word_t v);
      if (n != 0) regs[n] = v;
    endfunction

    function word_t ld(word_t a);
      a = a & dmask;
      return dm.exists(a) ? dm[a] : '0;
    endfunction

    function void st(word_t a, word_t v);
      dm[a & dmask] = v;
    endfunction

    function word_t fetch(word_t a);
      return pm.exists(a) ? pm[a] : '0;
    endfunction

    // true when the instruction at pc jumps to itself
    function bit halted();
      word_t ir;
      ir = fetch(pc);
      return ir[31:24] == 8'h0B && r(ir[23:16]) == 0 && r(ir[7:0]) == pc;
    endfunction

    function void step();
      word_t ir, a, b, c, npc;
      byte unsigned opc;
      ir  = fetch(pc);
      opc = ir[31:24];
      a   = r(ir[23:16]);
      b   = r(ir[15:8]);
      c   = r(ir[7:0]);
      npc = pc + 4;
      if (pmp_map) begin
        if (opc == 8'h00) opc = 8'hFF;       // NOP
        else if (opc == 8'h01) opc = 8'h00;  // ADD
      end else if (opc == 8'h01) opc = 8'hFF;
      begin
        byte unsigned ra, rb, rc, dst;
        bit hit;
        ra = ir[23:16]; rb = ir[15:8]; rc = ir[7:0];
        hit = 0;
        dst = 0;
        case (opc)
          8'h00, 8'h02, 8'h03, 8'h04, 8'h06, 8'h07, 8'h09, 8'h0A: begin
            hit = (ra == prev_dest) || (rb == prev_dest);
            dst = rc;
          end
          8'h05: begin hit = (ra == prev_dest); dst = rc; end
          8'h08: hit = (ra == prev_dest) || (rb == prev_dest) || (rc == prev_dest);
          8'h0B: begin hit = (ra == prev_dest) || (rc == prev_dest); dst = rb; end
          default: ;
        endcase
        if (prev_dest != 0 && hit) stalls++;
        prev_dest = dst;
      end
      case (opc)
        8'h00: w(ir[7:0], a + b);
        8'h02: w(ir[7:0], a * b);
        8'h03: w(ir[7:0], a & b);
        8'h04: w(ir[7:0], a | b);
        8'h05: w(ir[7:0], ~a);
        8'h06: w(ir[7:0], (b > 31) ? 32'd0 : a << b);
        8'h07: w(ir[7:0], ld(a + b));
        8'h08: st(a + b, c);
        8'h09: w(ir[7:0], (a == b) ? 32'd0 : 32'hFFFF_FFFF);
        8'h0A: w(ir[7:0], (a > b) ? 32'd0 : 32'hFFFF_FFFF);
        8'h0B: if (a == 0) begin
                 npc = c;
                 w(ir[15:8], pc + 4);
               end
        default: ;
      endcase
      if (ir[31:24] != 8'h00 || !pmp_map) executed++;
      pc = npc;
    endfunction
  endclass

  function automatic word_t ins(byte unsigned opc, byte unsigned a, byte unsigned b,
                                byte unsigned c);
    return {opc, a, b, c};
  endfunction

  // Reference program placed at byte address base. add_opc is 0x00 for the
  // sequential machine and 0x01 for the pipelined ones. Registers the host
  // must preset: R1 = 1, R2 = 0, R13 = base + 252, R17 = base + 56, and data
  // memory words 1 = 6, 2 = 5.
  function automatic void doc_program(word_t base, byte unsigned add_opc,
                                      ref pm_word_t prog[$]);
    prog.delete();
    prog.push_back('{base +   0, ins(8'h07,  1,  1,  3)});  // LD  R3  = DM[R1+R1]
    prog.push_back('{base +   4, ins(8'h07,  1,  1,  4)});  // LD  R4  = DM[R1+R1]
    prog.push_back('{base +   8, ins(8'h06,  3,  4,  5)});  // SLL R5  = R3 << R4
    prog.push_back('{base +  12, ins(8'h08,  2,  3,  5)});  // ST  DM[R2+R3] = R5
    prog.push_back('{base +  16, ins(add_opc, 3, 4,  6)});  // ADD R6  = R3 + R4
    prog.push_back('{base +  20, ins(8'h02,  3,  4,  7)});  // MULT R7 = R3 * R4
    prog.push_back('{base +  24, ins(8'h03,  3,  4,  8)});  // AND R8
    prog.push_back('{base +  28, ins(8'h04,  3,  4,  9)});  // OR  R9
    prog.push_back('{base +  32, ins(8'h05,  3,  0, 10)});  // NOT R10 = ~R3
    prog.push_back('{base +  36, ins(8'h09,  7,  8, 11)});  // EQ  R11 = (R7 == R8)
    prog.push_back('{base +  40, ins(8'h0B, 11, 12, 13)});  // JMP not taken
    prog.push_back('{base +  44, ins(8'h0A,  7,  8, 11)});  // GT  R11 = (R7 > R8)
    prog.push_back('{base +  48, ins(8'h0B, 11, 12, 13)});  // JMP taken to R13, R12 = link
    prog.push_back('{base +  52, ins(add_opc, 7, 8, 16)});  // ADD R16 = R7 + R8 (return point)
    prog.push_back('{base +  56, ins(8'h0B,  0,  0, 17)});  // halt: jump to self
    prog.push_back('{base + 252, ins(add_opc, 3, 4, 14)});  // subroutine: ADD R14
    prog.push_back('{base + 256, ins(8'h0B, 11, 15, 12)});  // JMP back to R12, R15 = link
  endfunction

  typedef struct {
    field_t r;
    word_t  v;
  } reg_init_t;

  // Random straight-line program of n instructions followed by a halt. Only
  // registers 16..63 are written. Loads and stores form their address from
  // R0..R4, which hold values below 64, so every access falls in data words
  // 0..127. No load directly follows a store. The halt loops through R15.
  function automatic void gen_random(word_t base, byte unsigned add_opc, int n,
                                     ref pm_word_t prog[$], ref reg_init_t regs[$]);
    byte unsigned opc, a, b, c, prev;
    prev = 8'h00;
    prog.delete();
    regs.delete();
    for (int i = 1; i <= 4; i++) regs.push_back('{field_t'(i), word_t'($urandom_range(0, 63))});
    for (int i = 5; i < 64; i++)
      if (i != 15) regs.push_back('{field_t'(i), (i < 8) ? word_t'($urandom_range(0, 40)) : word_t'($urandom)});
    regs.push_back('{field_t'(15), base + word_t'(4 * n)});
    for (int i = 0; i < n; i++) begin
      case ($urandom_range(0, 10))
        0: opc = add_opc;
        1: opc = 8'h02; 2: opc = 8'h03; 3: opc = 8'h04; 4: opc = 8'h05;
        5: opc = 8'h06; 6: opc = 8'h07; 7: opc = 8'h08; 8: opc = 8'h09;
        9: opc = 8'h0A;
        default: opc = add_opc;
      endcase
      // the pipelined core does not interlock a load right after a store
      if (opc == 8'h07 && prev == 8'h08) opc = add_opc;
      prev = opc;
      a = byte'($urandom_range(0, 63));
      b = byte'($urandom_range(0, 63));
      c = byte'($urandom_range(16, 63));
      if (opc == 8'h06) b = byte'($urandom_range(5, 7));            // shift by 0..40
      if (opc == 8'h07 || opc == 8'h08) begin
        a = byte'($urandom_range(0, 4));
        b = byte'($urandom_range(0, 4));
        if (opc == 8'h08) c = byte'($urandom_range(0, 63));
      end
      prog.push_back('{base + word_t'(4 * i), ins(opc, a, b, c)});
    end
    prog.push_back('{base + word_t'(4 * n), ins(8'h0B, 0, 0, 15)});
  endfunction

  // Counting loop: R20 counts down from count, R27 adds 3 per pass, and the
  // total is stored to data word 0. Every pass takes one JMP not taken and
  // one taken; the last pass takes the exit JMP.
  function automatic void gen_loop(word_t base, byte unsigned add_opc, int count,
                                   ref pm_word_t prog[$], ref reg_init_t regs[$]);
    prog.delete();
    regs.delete();
    regs.push_back('{field_t'(20), word_t'(count)});
    regs.push_back('{field_t'(22), 32'hFFFF_FFFF});
    regs.push_back('{field_t'(24), base + 20});
    regs.push_back('{field_t'(26), base});
    regs.push_back('{field_t'(15), base + 24});
    regs.push_back('{field_t'(27), 32'd0});
    regs.push_back('{field_t'(28), 32'd3});
    prog.push_back('{base +  0, ins(add_opc, 20, 22, 20)});  // R20 -= 1
    prog.push_back('{base +  4, ins(add_opc, 27, 28, 27)});  // R27 += 3
    prog.push_back('{base +  8, ins(8'h09, 20, 0, 23)});     // R23 = (R20 == 0)
    prog.push_back('{base + 12, ins(8'h0B, 23, 25, 24)});    // exit when zero
    prog.push_back('{base + 16, ins(8'h0B, 0, 25, 26)});     // back to the loop
    prog.push_back('{base + 20, ins(8'h08, 0, 0, 27)});      // DM[0] = R27
    prog.push_back('{base + 24, ins(8'h0B, 0, 0, 15)});      // halt
  endfunction

endpackage
