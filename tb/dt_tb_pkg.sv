// dt_tb_pkg -- test support for the defect-tolerant array testbenches.
//
// * Instruction encoders for the ISA in dt_pkg (a small assembler).
// * dt_iss: an instruction-set reference model. It executes a program one
//   instruction at a time with no notion of pipelining, so its final register
//   and memory state is the value a correct pipeline must reproduce whatever
//   its number of bubble stages.
// * Program generators: random hazard-dense programs and the four
//   micro-benchmark kinds (argument-heavy function calls, read-after-write
//   chains, non-taken branches in a loop, an empty for-loop).
// Every program ends by storing r1..r15 to DUMP_BASE.. and executing HALT, so
// the register state can be compared through the data memory.
package dt_tb_pkg;
  import dt_pkg::*;

  localparam int unsigned DUMP_BASE = 960;   // word address of the register dump
  localparam int unsigned TB_MEM    = 1024;

  typedef word_t prog_t[$];

  // ---------------- encoders ----------------
  function automatic word_t enc_r(logic [5:0] op, int rd, int rs1, int rs2);
    return {op, 4'(rd), 4'(rs1), 4'(rs2), 14'b0};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rd, int rs1, int imm);
    return {op, 4'(rd), 4'(rs1), 18'(imm)};
  endfunction
  function automatic word_t enc_ld(int rd, int base, int woff);
    return {OP_LD, 4'(rd), 4'(base), 18'(woff)};
  endfunction
  function automatic word_t enc_st(int rdata, int base, int woff);
    return {OP_ST, 4'(rdata), 4'(base), 18'(woff)};
  endfunction
  function automatic word_t enc_br(logic [5:0] op, int ra, int rb, int woff);
    return {op, 4'(ra), 4'(rb), 18'(woff)};
  endfunction
  function automatic word_t enc_jal(int rd, int woff);
    return {OP_JAL, 4'(rd), 4'd0, 18'(woff)};
  endfunction
  function automatic word_t enc_jr(int rs);
    return {OP_JR, 4'd0, 4'(rs), 18'd0};
  endfunction
  function automatic word_t enc_halt();
    return {OP_HALT, 26'd0};
  endfunction
  function automatic word_t enc_nop();
    return 32'd0;
  endfunction

  function automatic void append_dump_halt(ref prog_t p);
    for (int r = 1; r < 16; r++) p.push_back(enc_st(r, 0, DUMP_BASE + r));
    p.push_back(enc_halt());
  endfunction

  // ---------------- reference model ----------------
  class dt_iss;
    word_t regs[16];
    word_t dmem[TB_MEM];
    word_t imem[TB_MEM];
    bit    wrote[TB_MEM];
    int    steps;
    int    loads, stores, taken;

    function new();
      foreach (regs[i]) regs[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (imem[i]) imem[i] = '0;
      foreach (wrote[i]) wrote[i] = 0;
    endfunction

    function void load(prog_t p);
      foreach (p[i]) imem[i] = p[i];
    endfunction

    function automatic word_t alu(logic [5:0] op, word_t a, word_t b);
      case (op)
        OP_ADD, OP_ADDI: return a + b;
        OP_SUB:          return a - b;
        OP_AND, OP_ANDI: return a & b;
        OP_OR,  OP_ORI:  return a | b;
        OP_XOR, OP_XORI: return a ^ b;
        OP_SLL, OP_SLLI: return a << b[4:0];
        OP_SRL, OP_SRLI: return a >> b[4:0];
        OP_SRA, OP_SRAI: return word_t'($signed(a) >>> b[4:0]);
        OP_SLT, OP_SLTI: return {31'b0, $signed(a) < $signed(b)};
        OP_SLTU:         return {31'b0, a < b};
        default:         return '0;
      endcase
    endfunction

    // Runs until HALT; returns 1 if it halted within max_steps.
    function bit run(int max_steps);
      word_t pc, ins, sx, npc, res;
      logic [5:0] op;
      int ra, rb, rc;
      bit wr;
      pc = 0; steps = 0; loads = 0; stores = 0; taken = 0;
      while (steps < max_steps) begin
        ins = imem[pc[11:2]];
        op  = ins[31:26];
        ra  = int'(ins[25:22]);
        rb  = int'(ins[21:18]);
        rc  = int'(ins[17:14]);
        sx  = {{14{ins[17]}}, ins[17:0]};
        npc = pc + 4;
        wr  = 0;
        res = '0;
        steps++;
        case (op)
          OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_SLT, OP_SLTU: begin
            res = alu(op, regs[rb], regs[rc]); wr = 1;
          end
          OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SRAI, OP_SLTI: begin
            res = alu(op, regs[rb], sx); wr = 1;
          end
          OP_LUI: begin res = {ins[17:0], 14'b0}; wr = 1; end
          OP_LD:  begin res = dmem[10'(regs[rb] + (sx << 2) >> 2)]; wr = 1; loads++; end
          OP_ST:  begin
                    dmem[10'(regs[rb] + (sx << 2) >> 2)]  = regs[ra];
                    wrote[10'(regs[rb] + (sx << 2) >> 2)] = 1;
                    stores++;
                  end
          OP_BEQ: if (regs[ra] == regs[rb]) begin npc = pc + (sx << 2); taken++; end
          OP_BNE: if (regs[ra] != regs[rb]) begin npc = pc + (sx << 2); taken++; end
          OP_BLT: if ($signed(regs[ra]) <  $signed(regs[rb])) begin npc = pc + (sx << 2); taken++; end
          OP_BGE: if ($signed(regs[ra]) >= $signed(regs[rb])) begin npc = pc + (sx << 2); taken++; end
          OP_JAL: begin res = pc + 4; wr = 1; npc = pc + (sx << 2); taken++; end
          OP_JR:  begin npc = regs[rb]; taken++; end
          OP_HALT: return 1;
          default: ;
        endcase
        if (wr && ra != 0) regs[ra] = res;
        pc = npc;
      end
      return 0;
    endfunction
  endclass

  // ---------------- program generators ----------------

  // Random straight-line code with forward branches, dense in dependencies:
  // only r1..r6 are used, loads/stores hit a 16-word window at word 64.
  function automatic prog_t gen_random(int n);
    prog_t p;
    int kind, rd, r1, r2;
    p.push_back(enc_i(OP_ADDI, 7, 0, 256));         // r7 = byte base of the window
    for (int w = 0; w < 16; w++) p.push_back(enc_st(0, 7, w));
    for (int i = 1; i <= 6; i++) p.push_back(enc_i(OP_ADDI, i, 0, $urandom_range(0, 40) - 20));
    for (int i = 0; i < n; i++) begin
      kind = $urandom_range(0, 9);
      rd   = $urandom_range(1, 6);
      r1   = $urandom_range(0, 6);
      r2   = $urandom_range(0, 6);
      case (kind)
        0, 1: p.push_back(enc_r(6'($urandom_range(1, 10)), rd, r1, r2));
        2:    p.push_back(enc_i(6'($urandom_range(16, 23)), rd, r1, $urandom_range(0, 30) - 15));
        3, 4: p.push_back(enc_ld(rd, 7, $urandom_range(0, 15)));
        5:    p.push_back(enc_st(r1, 7, $urandom_range(0, 15)));
        6:    p.push_back(enc_br(6'($urandom_range(OP_BEQ, OP_BGE)), r1, r2, $urandom_range(1, 4)));
        7:    begin                                  // load then immediate use
                p.push_back(enc_ld(rd, 7, $urandom_range(0, 15)));
                p.push_back(enc_r(OP_ADD, $urandom_range(1, 6), rd, r2));
              end
        8:    begin                                  // load then store of the loaded value
                p.push_back(enc_ld(rd, 7, $urandom_range(0, 15)));
                if ($urandom_range(0, 1)) p.push_back(enc_nop());
                p.push_back(enc_st(rd, 7, $urandom_range(0, 15)));
              end
        default: p.push_back(enc_i(OP_LUI, rd, 0, $urandom_range(0, 255)));
      endcase
    end
    append_dump_halt(p);
    return p;
  endfunction

  // Function-argument heavy: the caller stores many arguments to a frame, the
  // callee loads them and uses each loaded value immediately.
  function automatic prog_t gen_bench_args(int iters);
    prog_t p;
    p.push_back(enc_i(OP_ADDI, 13, 0, 512));        // r13 = frame pointer (bytes)
    p.push_back(enc_i(OP_ADDI, 12, 0, iters));      // r12 = loop count
    p.push_back(enc_i(OP_ADDI, 11, 0, 0));          // r11 = accumulator
    // loop: (pc 12)
    for (int a = 0; a < 6; a++) begin
      p.push_back(enc_i(OP_ADDI, 1, 12, a * 3));
      p.push_back(enc_st(1, 13, a));
    end
    p.push_back(enc_jal(14, 4));                    // call f
    p.push_back(enc_i(OP_ADDI, 12, 12, -1));
    p.push_back(enc_br(OP_BNE, 12, 0, -(6 * 2 + 2)));
    p.push_back(enc_jal(0, 1 + 6 * 2 + 1));         // skip over f
    // f: load six arguments, sum them with immediate use
    for (int a = 0; a < 6; a++) begin
      p.push_back(enc_ld(2, 13, a));
      p.push_back(enc_r(OP_ADD, 11, 11, 2));
    end
    p.push_back(enc_jr(14));
    append_dump_halt(p);
    return p;
  endfunction

  // Read-after-write heavy: long chains where every instruction uses the
  // previous result.
  function automatic prog_t gen_bench_raw(int iters);
    prog_t p;
    p.push_back(enc_i(OP_ADDI, 12, 0, iters));
    p.push_back(enc_i(OP_ADDI, 1, 0, 1));
    for (int k = 0; k < 8; k++) begin
      p.push_back(enc_r(OP_ADD, 2, 1, 1));
      p.push_back(enc_r(OP_XOR, 3, 2, 1));
      p.push_back(enc_r(OP_ADD, 1, 3, 2));
      p.push_back(enc_i(OP_SRLI, 1, 1, 1));
    end
    p.push_back(enc_i(OP_ADDI, 12, 12, -1));
    p.push_back(enc_br(OP_BNE, 12, 0, -(8 * 4 + 1)));
    append_dump_halt(p);
    return p;
  endfunction

  // Branch heavy: a loop full of compare-and-branch instructions that are
  // not taken, plus the taken loop back-edge.
  function automatic prog_t gen_bench_branch(int iters);
    prog_t p;
    p.push_back(enc_i(OP_ADDI, 12, 0, iters));
    p.push_back(enc_i(OP_ADDI, 5, 0, 0));
    for (int k = 0; k < 6; k++) begin
      p.push_back(enc_i(OP_ADDI, 5, 5, 1));
      p.push_back(enc_br(OP_BLT, 5, 0, 2));         // never taken (r5 > 0)
      p.push_back(enc_i(OP_ADDI, 6, 5, k));
    end
    p.push_back(enc_i(OP_ADDI, 12, 12, -1));
    p.push_back(enc_br(OP_BNE, 12, 0, -(6 * 3 + 1)));
    append_dump_halt(p);
    return p;
  endfunction

  // Empty for-loop with its counter kept in memory, as unoptimised compiled
  // code keeps a loop variable: load, increment, store, compare, branch.
  function automatic prog_t gen_bench_loop(int iters);
    prog_t p;
    p.push_back(enc_i(OP_ADDI, 13, 0, 512));
    p.push_back(enc_st(0, 13, 0));                  // i = 0
    p.push_back(enc_i(OP_ADDI, 4, 0, iters));
    p.push_back(enc_ld(1, 13, 0));                  // loop: r1 = i
    p.push_back(enc_i(OP_ADDI, 1, 1, 1));           // i + 1
    p.push_back(enc_st(1, 13, 0));                  // i = i + 1
    p.push_back(enc_ld(2, 13, 0));
    p.push_back(enc_br(OP_BLT, 2, 4, -4));          // while (i < iters)
    append_dump_halt(p);
    return p;
  endfunction

endpackage
