// tb_dec_stage -- checks instruction decoding, register reads and the merged
// write-back of the decode stage.
//
// First every register r1..r15 is written through the write-back port. Then
// random instructions of every class (register ALU, immediate ALU, LUI, load,
// store, conditional branch, JAL, JR, HALT, NOP) enter with random PC and
// stream ID while random write-backs continue. One cycle later (the stage's
// latency) the DEC->EX payload must carry the expected flags, register
// numbers, register values (including a value written back in the same
// cycle), immediate (sign-extended, word offsets scaled by 4, LUI shifted up
// by 14), branch kind and PC/stream ID. The expected values are built here
// field by field from the instruction format, not by a second decoder.
// The instruction encoding checked here is this design's own.
module tb_dec_stage;
  import dt_pkg::*;
  import dt_tb_pkg::*;

  logic clk = 0, rst_n;
  ifdec_t in;
  memwb_t wb;
  decex_t out;
  word_t model [16];
  int checks = 0, failures = 0;
  int n_class [10];

  always #5 clk = ~clk;

  dec_stage dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t sx(int v);
    return word_t'(v);
  endfunction

  initial begin
    int c, ra, rb, rc, imm, r1, r2;
    bit u1, u2, wr, ld, st, hl, chk_imm;
    word_t e_imm;
    br_kind_t e_br;
    logic [5:0] op;
    rst_n = 0; in = '0; wb = '0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int r = 1; r < 16; r++) begin
      @(negedge clk);
      wb = '{valid: 1'b1, rd: ridx_t'(r), value: $urandom};
      model[r] = wb.value;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      c  = $urandom % 10;
      ra = $urandom % 16; rb = $urandom % 16; rc = $urandom % 16;
      imm = int'($urandom % 2000) - 1000;
      u1 = 0; u2 = 0; wr = 0; ld = 0; st = 0; hl = 0; chk_imm = 1;
      r1 = 0; r2 = 0; e_br = BR_NONE; e_imm = sx(imm);
      in.valid = 1'b1; in.sid = 1'($urandom); in.pc = {20'b0, 10'($urandom), 2'b0};
      case (c)
        0: begin op = 6'h01 + 6'($urandom % 10); in.instr = enc_r(op, ra, rb, rc);
                 wr = 1; u1 = 1; u2 = 1; r1 = rb; r2 = rc; chk_imm = 0; end
        1: begin op = 6'h10 + 6'($urandom % 8); in.instr = enc_i(op, ra, rb, imm);
                 wr = 1; u1 = 1; r1 = rb; end
        2: begin imm = $urandom % 262144; in.instr = enc_i(OP_LUI, ra, 0, imm);
                 wr = 1; e_imm = word_t'(imm) << 14; end
        3: begin in.instr = enc_ld(ra, rb, imm); wr = 1; ld = 1; u1 = 1; r1 = rb; e_imm = sx(imm * 4); end
        4: begin in.instr = enc_st(ra, rb, imm); st = 1; u1 = 1; u2 = 1; r1 = rb; r2 = ra; e_imm = sx(imm * 4); end
        5: begin op = 6'h28 + 6'($urandom % 4); in.instr = enc_br(op, ra, rb, imm);
                 u1 = 1; u2 = 1; r1 = ra; r2 = rb; e_imm = sx(imm * 4);
                 e_br = br_kind_t'(int'(BR_EQ) + int'(op - 6'h28)); end
        6: begin in.instr = enc_jal(ra, imm); wr = 1; e_br = BR_JAL; e_imm = sx(imm * 4); end
        7: begin in.instr = enc_jr(rb); u1 = 1; r1 = rb; e_br = BR_JR; chk_imm = 0; end
        8: begin in.instr = enc_halt(); hl = 1; chk_imm = 0; end
        default: begin in.instr = enc_nop(); chk_imm = 0; end
      endcase
      if (ra == 0) wr = 0;
      n_class[c]++;
      wb.valid = 1'($urandom); wb.rd = ridx_t'((t % 4 == 0) ? r1 : $urandom % 16); wb.value = $urandom;
      if (wb.valid && wb.rd != 0) model[wb.rd] = wb.value;   // written this cycle, read through
      @(posedge clk); #1;
      check(out.valid && out.sid == in.sid && out.pc == in.pc, $sformatf("class %0d: valid/sid/pc", c));
      check(out.is_load == ld && out.is_store == st && out.is_halt == hl && out.wr_rd == wr,
            $sformatf("class %0d: flags ld %0d st %0d halt %0d wr %0d", c, out.is_load, out.is_store, out.is_halt, out.wr_rd));
      if (wr) check(out.rd == ridx_t'(ra), $sformatf("class %0d: rd %0d, expected %0d", c, out.rd, ra));
      check(out.use_rs1 == u1 && out.use_rs2 == u2, $sformatf("class %0d: operand use %0d%0d", c, out.use_rs1, out.use_rs2));
      if (u1) check(out.rs1 == ridx_t'(r1) && out.rs1_val == model[r1],
                    $sformatf("class %0d: rs1 r%0d = %h, expected r%0d = %h", c, out.rs1, out.rs1_val, r1, model[r1]));
      if (u2) check(out.rs2 == ridx_t'(r2) && out.rs2_val == model[r2],
                    $sformatf("class %0d: rs2 r%0d = %h, expected r%0d = %h", c, out.rs2, out.rs2_val, r2, model[r2]));
      if (chk_imm) check(out.imm == e_imm, $sformatf("class %0d: imm %h, expected %h", c, out.imm, e_imm));
      check(out.br == e_br, $sformatf("class %0d: branch kind %0d, expected %0d", c, out.br, e_br));
      wb = '0;
    end
    foreach (n_class[i]) check(n_class[i] > 0, $sformatf("class %0d exercised", i));
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
