// tb_ex_stage -- checks the execute stage: ALU, bypass from the state-saving
// buffer, stream-ID drop, flush/reload on a load dependency, load fill from
// the MEM feedback, branch/jump resolution, deferred store data and HALT.
//
// Instructions are driven directly as DEC->EX payloads, one per cycle. The
// EX->IF feedback and the event pulses are combinational and checked in the
// cycle the instruction is present; the EX->MEM payload is registered and
// checked one cycle later. A random phase issues ALU instructions on r1..r3
// whose register-file values are deliberately stale whenever the register was
// written by one of the last four instructions, so the result is only right
// if the buffer bypass works; expected results come from a model of the
// register values kept here.
// Drop, reload and branch flush follow the description; the encoding of the
// payloads and the HALT behaviour are this design's choices.
module tb_ex_stage;
  import dt_pkg::*;

  logic clk = 0, rst_n, halted;
  decex_t in;
  memwb_t memfb;
  exmem_t out;
  exif_t  fb;
  ex_ev_t ev;
  int checks = 0, failures = 0;
  logic sid;
  word_t pc;

  always #5 clk = ~clk;

  ex_stage dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic decex_t alu(alu_op_t op, int rd, int rs1, word_t v1, int rs2, word_t v2, bit imm, word_t iv);
    decex_t d = '0;
    d.valid = 1; d.sid = sid; d.pc = pc; d.alu_op = op; d.wr_rd = (rd != 0); d.rd = ridx_t'(rd);
    d.use_rs1 = 1; d.rs1 = ridx_t'(rs1); d.rs1_val = v1;
    d.use_rs2 = !imm; d.rs2 = imm ? '0 : ridx_t'(rs2); d.rs2_val = v2;
    d.use_imm = imm; d.imm = iv;
    return d;
  endfunction

  function automatic decex_t ld(int rd, int base, word_t bv, word_t off);
    decex_t d = alu(ALU_ADD, rd, base, bv, 0, '0, 1, off);
    d.is_load = 1;
    return d;
  endfunction

  function automatic decex_t st(int data, word_t dv, int base, word_t bv, word_t off);
    decex_t d = alu(ALU_ADD, 0, base, bv, data, dv, 0, '0);
    d.use_imm = 1; d.imm = off; d.use_rs2 = 1; d.is_store = 1;
    return d;
  endfunction

  function automatic decex_t br(br_kind_t k, int ra, word_t va, int rb, word_t vb, word_t off);
    decex_t d = alu(ALU_ADD, 0, ra, va, rb, vb, 0, '0);
    d.br = k; d.imm = off;
    if (k == BR_JAL) begin d.use_rs1 = 0; d.use_rs2 = 0; d.rs1 = '0; d.rs2 = '0; end
    if (k == BR_JR)  begin d.use_rs2 = 0; d.rs2 = '0; end
    return d;
  endfunction

  // Drive one instruction for one cycle; feedback and events are sampled in
  // that cycle, the EX->MEM payload after the clock edge.
  exif_t  s_fb;
  ex_ev_t s_ev;
  task automatic step(decex_t d, memwb_t f = '0);
    @(negedge clk);
    in = d; memfb = f;
    #1;
    s_fb = fb; s_ev = ev;
    @(posedge clk); #1;
    pc += 4;
  endtask

  initial begin
    decex_t d;
    word_t model [4];
    int age [4];
    int n_rand_byp = 0;
    rst_n = 0; in = '0; memfb = '0; sid = 0; pc = 32'h100;
    #12 rst_n = 1;

    // ALU and ALU-entry bypass
    step(alu(ALU_ADD, 1, 2, 32'd5, 3, 32'd7, 0, '0));
    check(s_ev.retire && !s_fb.valid, "add executes without feedback");
    check(out.valid && out.wr_rd && out.rd == 1 && out.result == 32'd12, $sformatf("add result %0d", out.result));
    step(alu(ALU_ADD, 4, 1, 32'hDEAD, 0, '0, 1, 32'd1));
    check(s_ev.byp_alu && out.result == 32'd13, $sformatf("bypassed add result %0d", out.result));

    // load, dependent instruction reloads, stale stream dropped, fill, bypass of arrived load
    step(ld(5, 0, '0, 32'd64));
    check(out.valid && out.is_load && out.result == 32'd64, "load address");
    d = alu(ALU_ADD, 6, 5, 32'hBAD, 0, '0, 1, 32'd1);
    step(d);
    check(s_ev.reload && s_fb.valid && s_fb.reload && s_fb.target == d.pc && !out.valid,
          $sformatf("load-use reload: ev %0d fb %0d/%0d target %h out %0d", s_ev.reload, s_fb.valid, s_fb.reload, s_fb.target, out.valid));
    step(alu(ALU_ADD, 7, 0, '0, 0, '0, 1, 32'd9), '{valid: 1'b1, rd: 4'd5, value: 32'd100});
    check(s_ev.drop && !s_ev.retire && !out.valid, "instruction of the old stream dropped");
    check(s_ev.ld_fill, "load value filled into the buffer");
    sid = ~sid;
    d.sid = sid;
    step(d);
    check(s_ev.byp_ld && out.valid && out.result == 32'd101, $sformatf("arrived-load bypass result %0d", out.result));

    // branches and jumps
    pc = 32'h200;
    step(br(BR_EQ, 1, '0, 1, '0, 32'h40));
    check(s_ev.flush_branch && s_fb.valid && !s_fb.reload && s_fb.target == 32'h240, $sformatf("taken BEQ target %h", s_fb.target));
    step(br(BR_EQ, 0, '0, 0, '0, 32'h40));
    check(s_ev.drop, "wrong-path instruction dropped after a taken branch");
    sid = ~sid;
    step(br(BR_NE, 1, '0, 4, '0, 32'h40));
    check(s_ev.flush_branch && s_fb.target == pc - 4 + 32'h40, "BNE on bypassed values (12 != 13) taken");
    sid = ~sid;
    step(br(BR_LT, 4, '0, 1, '0, 32'h40));
    check(!s_fb.valid && s_ev.retire, "BLT 13 < 12 not taken");
    pc = 32'h300;
    step(br(BR_JAL, 0, '0, 0, '0, 32'h10));
    check(s_fb.valid && s_fb.target == 32'h310, "JAL target");
    sid = ~sid;
    d = br(BR_JAL, 0, '0, 0, '0, 32'h8); d.wr_rd = 1; d.rd = 4'd7;
    step(d);
    check(out.result == d.pc + 4 && out.wr_rd && out.rd == 7, "JAL link value");
    sid = ~sid;
    step(br(BR_JR, 7, 32'h0, 0, '0, '0));
    check(s_fb.valid && s_fb.target == d.pc + 4, $sformatf("JR target %h via bypass", s_fb.target));
    sid = ~sid;

    // store whose data waits on a load: passed to MEM, no reload
    step(ld(8, 0, '0, 32'd16));
    step(st(8, 32'hBAD, 0, '0, 32'd32));
    check(s_ev.st_defer && !s_ev.reload && out.valid && out.is_store && out.st_from_mem && out.st_src == 8,
          "store data deferred to MEM");
    step(alu(ALU_ADD, 9, 0, '0, 0, '0, 1, 32'd3), '{valid: 1'b1, rd: 4'd8, value: 32'd55});
    check(s_ev.ld_fill, "deferred load filled");
    step(st(8, 32'hBAD, 0, '0, 32'd32));
    check(!out.st_from_mem && out.st_data == 32'd55, "store data from arrived load");

    // random ALU phase with stale register-file values
    for (int r = 1; r < 4; r++) begin
      step(alu(ALU_ADD, r, 0, '0, 0, '0, 1, 32'(r * 11)));
      model[r] = 32'(r * 11);
    end
    for (int r = 1; r < 4; r++) age[r] = 3 - r;
    for (int t = 0; t < 500; t++) begin
      int rd, a, b;
      alu_op_t op;
      word_t va, vb, e;
      rd = 1 + $urandom % 3; a = 1 + $urandom % 3; b = 1 + $urandom % 3;
      op = alu_op_t'($urandom % 5);   // ADD SUB AND OR XOR
      va = (age[a] < 4) ? $urandom : model[a];
      vb = (age[b] < 4) ? $urandom : model[b];
      if (age[a] < 4 || age[b] < 4) n_rand_byp++;
      case (op)
        ALU_SUB: e = model[a] - model[b];
        ALU_AND: e = model[a] & model[b];
        ALU_OR:  e = model[a] | model[b];
        ALU_XOR: e = model[a] ^ model[b];
        default: e = model[a] + model[b];
      endcase
      step(alu(op, rd, a, va, b, vb, 0, '0));
      check(out.valid && out.result == e, $sformatf("random op %0d r%0d r%0d: %h, expected %h", op, a, b, out.result, e));
      model[rd] = e;
      for (int r = 1; r < 4; r++) age[r]++;
      age[rd] = 0;
    end
    check(n_rand_byp > 100, "random phase needed the bypass");

    // HALT: everything after it is ignored
    d = '0; d.valid = 1; d.sid = sid; d.pc = pc; d.is_halt = 1;
    step(d);
    check(halted && !out.valid, "halted after HALT");
    step(alu(ALU_ADD, 1, 0, '0, 0, '0, 1, 32'd1));
    check(!out.valid && !s_ev.retire, "nothing executes after HALT");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
