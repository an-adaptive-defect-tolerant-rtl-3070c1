// dec_stage -- instruction decode, register file and the merged write-back.
//
// Decodes the instruction arriving on the IF->DEC link, reads its source
// registers and sends the decoded instruction with its register values to the
// DEC->EX link through its output register. The register file is written by
// the MEM->WB link: write-back has no logic of its own, it is only the wires
// of that link ending here, which is why a core has four physical stages.
//
// This stage does no hazard checking and never stalls: every dependency is
// resolved in EX from the state-saving buffer, and instructions of a stale
// stream are passed on and dropped in EX. The source values read here may be
// stale; EX replaces them when the buffer holds a newer value.
//
// Timing: one cycle, output registered. Register writes are visible to the
// reads of the same cycle.
// Following the description: decode and register reads in DEC, the write-back
// folded into DEC, no stalls, no hazard logic before EX. This design's own
// choices: the instruction encoding (see dt_pkg) and treating an undefined
// opcode as a no-operation. Jumps are resolved in EX with the branches, so a
// single branch feedback (EX->IF) exists.
module dec_stage (
  input  logic           clk,
  input  logic           rst_n,
  input  dt_pkg::ifdec_t in,
  input  dt_pkg::memwb_t wb,
  output dt_pkg::decex_t out
);
  import dt_pkg::*;

  decex_t d;
  word_t  rv1, rv2;
  logic [5:0] op;
  ridx_t ra, rb, rc;
  word_t imm;

  assign op  = in.instr[31:26];
  assign ra  = in.instr[25:22];
  assign rb  = in.instr[21:18];
  assign rc  = in.instr[17:14];
  assign imm = {{14{in.instr[17]}}, in.instr[17:0]};

  regfile u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (wb.valid),
    .waddr (wb.rd),
    .wdata (wb.value),
    .raddr1(d.rs1),
    .rdata1(rv1),
    .raddr2(d.rs2),
    .rdata2(rv2)
  );

  always_comb begin
    d          = '0;
    d.valid    = in.valid;
    d.sid      = in.sid;
    d.pc       = in.pc;
    d.imm      = imm;
    d.alu_op   = ALU_ADD;
    d.br       = BR_NONE;
    d.rd       = ra;
    d.rs1      = rb;
    d.rs2      = rc;
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_SLT, OP_SLTU: begin
        d.wr_rd   = 1'b1;
        d.use_rs1 = 1'b1;
        d.use_rs2 = 1'b1;
        case (op)
          OP_SUB:  d.alu_op = ALU_SUB;
          OP_AND:  d.alu_op = ALU_AND;
          OP_OR:   d.alu_op = ALU_OR;
          OP_XOR:  d.alu_op = ALU_XOR;
          OP_SLL:  d.alu_op = ALU_SLL;
          OP_SRL:  d.alu_op = ALU_SRL;
          OP_SRA:  d.alu_op = ALU_SRA;
          OP_SLT:  d.alu_op = ALU_SLT;
          OP_SLTU: d.alu_op = ALU_SLTU;
          default: d.alu_op = ALU_ADD;
        endcase
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SRAI, OP_SLTI: begin
        d.wr_rd   = 1'b1;
        d.use_rs1 = 1'b1;
        d.use_imm = 1'b1;
        case (op)
          OP_ANDI: d.alu_op = ALU_AND;
          OP_ORI:  d.alu_op = ALU_OR;
          OP_XORI: d.alu_op = ALU_XOR;
          OP_SLLI: d.alu_op = ALU_SLL;
          OP_SRLI: d.alu_op = ALU_SRL;
          OP_SRAI: d.alu_op = ALU_SRA;
          OP_SLTI: d.alu_op = ALU_SLT;
          default: d.alu_op = ALU_ADD;
        endcase
      end
      OP_LUI: begin
        d.wr_rd   = 1'b1;
        d.use_imm = 1'b1;
        d.alu_op  = ALU_PASSB;
        d.imm     = {in.instr[17:0], 14'b0};
      end
      OP_LD: begin
        d.wr_rd   = 1'b1;
        d.is_load = 1'b1;
        d.use_rs1 = 1'b1;
        d.use_imm = 1'b1;
        d.imm     = {imm[29:0], 2'b00};
      end
      OP_ST: begin
        d.is_store = 1'b1;
        d.use_rs1  = 1'b1;
        d.use_rs2  = 1'b1;
        d.rs2      = ra;        // store data register
        d.use_imm  = 1'b1;
        d.imm      = {imm[29:0], 2'b00};
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        d.use_rs1 = 1'b1;
        d.use_rs2 = 1'b1;
        d.rs1     = ra;
        d.rs2     = rb;
        d.imm     = {imm[29:0], 2'b00};
        case (op)
          OP_BEQ:  d.br = BR_EQ;
          OP_BNE:  d.br = BR_NE;
          OP_BLT:  d.br = BR_LT;
          default: d.br = BR_GE;
        endcase
      end
      OP_JAL: begin
        d.wr_rd = 1'b1;
        d.br    = BR_JAL;
        d.imm   = {imm[29:0], 2'b00};
      end
      OP_JR: begin
        d.use_rs1 = 1'b1;
        d.br      = BR_JR;
      end
      OP_HALT: d.is_halt = 1'b1;
      default: ;   // NOP and undefined opcodes
    endcase
    if (d.rd == '0) d.wr_rd = 1'b0;
    if (!d.use_rs1) d.rs1 = '0;
    if (!d.use_rs2) d.rs2 = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else begin
      out         <= d;
      out.rs1_val <= rv1;
      out.rs2_val <= rv2;
    end
  end

endmodule
