// ex_stage -- execute stage: ALU, branch resolution, bypassing from the
// state-saving buffer, and the execute half of the flush/reload scheme.
//
// Stream check. The stage keeps a 1-bit stream-ID register. An instruction
// whose ID differs from it belongs to a stream that was cancelled (wrong branch
// path, or instructions behind one that was sent back for reload) and is
// dropped: it changes no buffer entry and sends nothing to MEM.
//
// Operands. For each source register the stage searches its state-saving
// buffer (state_fifo, FIFO_DEPTH entries, one per cycle of the pipeline behind
// EX) for the youngest instruction that writes it. An ALU result or an arrived
// load value is used directly (bypass). If none is found, the value read in DEC
// is correct. If the youngest writer is a load whose value has not come back
// over the MEM->EX feedback, the instruction cannot execute.
//
// Flush/reload instead of a stall. Such an instruction is dropped, the stream
// ID is flipped and the EX->IF feedback asks IF to re-fetch it from its own PC.
// By the time it returns the load value has usually arrived; otherwise the
// same happens again. Exception: a store whose data (not address) waits on a
// load is let through with st_from_mem set; the MEM stage takes the data from
// its own state buffer.
//
// Branches are predicted not taken. A taken branch or jump flips the stream ID
// and sends its target over the EX->IF feedback.
//
// HALT stops the stage: it sets halted and ignores every later instruction.
//
// Timing: one cycle, EX->MEM output registered, EX->IF feedback combinational
// (the link adds one register per interconnect hop). The buffer shifts every
// cycle, so stalls never exist anywhere in the pipeline.
//
// Following the description: stream-ID flushing, flush/reload on a load
// dependency, the buffer in EX with its pending/arrived load codes, the
// MEM->EX fill, store data resolved in MEM. This design's own choices: the
// default depth of 2*N (see README), the ALU operation set, resolving jumps in
// EX, the HALT behaviour.
module ex_stage #(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dt_pkg::decex_t in,
  input  dt_pkg::memwb_t memfb,    // load values from MEM
  output dt_pkg::exmem_t out,      // to the EX->MEM link (registered)
  output dt_pkg::exif_t  fb,       // to the EX->IF link (combinational)
  output dt_pkg::ex_ev_t ev,
  output logic           halted
);
  import dt_pkg::*;

  logic    sid_q;
  logic    halted_q;
  logic    take, drop, stall, exec, redirect, taken;
  logic    pend1, pend2, byp1, byp2, bypl1, bypl2, st_defer;
  word_t   v1, v2, opb, alu_res, br_target, result;
  sentry_t push;
  logic    fill_hit;

  ridx_t  [1:0] q_reg;
  logic   [1:0] q_hit;
  skind_t [1:0] q_kind;
  word_t  [1:0] q_value;

  assign q_reg[0] = in.use_rs1 ? in.rs1 : '0;
  assign q_reg[1] = in.use_rs2 ? in.rs2 : '0;

  state_fifo #(.DEPTH(FIFO_DEPTH), .NQ(2)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (1'b1),
    .push      (push),
    .fill_valid(memfb.valid),
    .fill_rd   (memfb.rd),
    .fill_value(memfb.value),
    .q_reg     (q_reg),
    .q_hit     (q_hit),
    .q_kind    (q_kind),
    .q_value   (q_value),
    .fill_hit  (fill_hit)
  );

  // Operand resolution
  always_comb begin
    pend1 = q_hit[0] && q_kind[0] == SK_LD_PEND;
    pend2 = q_hit[1] && q_kind[1] == SK_LD_PEND;
    byp1  = q_hit[0] && q_kind[0] == SK_ALU;
    byp2  = q_hit[1] && q_kind[1] == SK_ALU;
    bypl1 = q_hit[0] && q_kind[0] == SK_LD_DONE;
    bypl2 = q_hit[1] && q_kind[1] == SK_LD_DONE;
    v1    = (byp1 || bypl1) ? q_value[0] : in.rs1_val;
    v2    = (byp2 || bypl2) ? q_value[1] : in.rs2_val;
  end

  // ALU
  always_comb begin
    opb = in.use_imm ? in.imm : v2;
    unique case (in.alu_op)
      ALU_SUB:   alu_res = v1 - opb;
      ALU_AND:   alu_res = v1 & opb;
      ALU_OR:    alu_res = v1 | opb;
      ALU_XOR:   alu_res = v1 ^ opb;
      ALU_SLL:   alu_res = v1 << opb[4:0];
      ALU_SRL:   alu_res = v1 >> opb[4:0];
      ALU_SRA:   alu_res = word_t'($signed(v1) >>> opb[4:0]);
      ALU_SLT:   alu_res = {31'b0, $signed(v1) < $signed(opb)};
      ALU_SLTU:  alu_res = {31'b0, v1 < opb};
      ALU_PASSB: alu_res = opb;
      default:   alu_res = v1 + opb;
    endcase
  end

  // Branch resolution
  always_comb begin
    unique case (in.br)
      BR_EQ:   taken = (v1 == v2);
      BR_NE:   taken = (v1 != v2);
      BR_LT:   taken = ($signed(v1) < $signed(v2));
      BR_GE:   taken = ($signed(v1) >= $signed(v2));
      BR_JAL,
      BR_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase
    br_target = (in.br == BR_JR) ? v1 : in.pc + in.imm;
    result    = (in.br == BR_JAL) ? in.pc + 32'd4 : alu_res;
  end

  // Stream check, flush/reload and redirect
  always_comb begin
    take     = in.valid && (in.sid == sid_q) && !halted_q;
    drop     = in.valid && !take;
    stall    = take && (pend1 || (pend2 && !in.is_store));
    st_defer = take && !stall && in.is_store && pend2;
    exec     = take && !stall;
    redirect = exec && taken;

    fb        = '0;
    fb.valid  = stall || redirect;
    fb.reload = stall;
    fb.target = stall ? in.pc : br_target;

    push = '0;
    if (exec && in.wr_rd) begin
      push.kind  = in.is_load ? SK_LD_PEND : SK_ALU;
      push.rd    = in.rd;
      push.value = result;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sid_q    <= 1'b0;
      halted_q <= 1'b0;
      out      <= '0;
    end else begin
      if (stall || redirect) sid_q <= ~sid_q;
      if (exec && in.is_halt) halted_q <= 1'b1;
      out.valid       <= exec && !in.is_halt;
      out.is_load     <= in.is_load;
      out.is_store    <= in.is_store;
      out.wr_rd       <= in.wr_rd;
      out.rd          <= in.rd;
      out.result      <= result;
      out.st_data     <= v2;
      out.st_from_mem <= st_defer;
      out.st_src      <= in.rs2;
    end
  end

  assign halted = halted_q;

  always_comb begin
    ev              = '0;
    ev.retire       = exec;
    ev.drop         = drop;
    ev.flush_branch = redirect;
    ev.reload       = stall;
    ev.byp_alu      = exec && ((in.use_rs1 && byp1) || (in.use_rs2 && byp2));
    ev.byp_ld       = exec && ((in.use_rs1 && bypl1) || (in.use_rs2 && bypl2));
    ev.ld_fill      = fill_hit;
    ev.st_defer     = st_defer;
    ev.halted       = halted_q;
  end

endmodule
