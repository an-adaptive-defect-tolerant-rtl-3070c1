// dt_pkg -- types and constants shared by the defect-tolerant processor array.
//
// The array is built from 5-stage RISC pipelines (IF, DEC, EX, MEM, WB) whose
// stages are decoupled: every stage owns its output pipeline register and talks
// to the next stage only through a link of the reconfigurable interconnect.
// Write-back is folded into DEC, so a core is four physical stages joined by
// four forward links (IF->DEC, DEC->EX, EX->MEM, MEM->WB) and two feedback links
// (EX->IF branch/reload feedback, MEM->EX load-value feedback).
//
// What follows the design description: 32-bit instructions, 16 registers with
// r0 hard-wired to zero, a 2-bit instruction-type ID in the state-saving
// buffers (no result / ALU result / load, plus the spare code marking a load
// whose value has arrived), a 1-bit instruction-stream ID, the 3-bit switch
// control code of the interconnect switch.
// What is this design's own choice: the instruction encoding and opcode
// numbering below (the description gives the instruction classes but no
// encoding), and the exact field lists of the link payloads.
//
// Instruction encoding (32 bits):
//   [31:26] opcode   [25:22] ra   [21:18] rb   [17:14] rc   [17:0] imm18 (signed)
//   ALU reg   : rd=ra, rs1=rb, rs2=rc
//   ALU imm   : rd=ra, rs1=rb, imm
//   LUI       : rd=ra, rd = imm18 << 14
//   LD        : rd=ra, base=rb, word offset imm  (address = rb + imm*4)
//   ST        : data=ra, base=rb, word offset imm
//   Bxx       : compare ra with rb, target = pc + imm*4
//   JAL       : rd=ra gets pc+4, target = pc + imm*4
//   JR        : target = rb
//   HALT      : stops the core (execute stage ignores everything after it)
package dt_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned NREGS  = 16;
  localparam int unsigned RIDX_W = 4;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  // Opcodes
  localparam logic [5:0] OP_NOP  = 6'h00;
  localparam logic [5:0] OP_ADD  = 6'h01;
  localparam logic [5:0] OP_SUB  = 6'h02;
  localparam logic [5:0] OP_AND  = 6'h03;
  localparam logic [5:0] OP_OR   = 6'h04;
  localparam logic [5:0] OP_XOR  = 6'h05;
  localparam logic [5:0] OP_SLL  = 6'h06;
  localparam logic [5:0] OP_SRL  = 6'h07;
  localparam logic [5:0] OP_SRA  = 6'h08;
  localparam logic [5:0] OP_SLT  = 6'h09;
  localparam logic [5:0] OP_SLTU = 6'h0A;
  localparam logic [5:0] OP_ADDI = 6'h10;
  localparam logic [5:0] OP_ANDI = 6'h11;
  localparam logic [5:0] OP_ORI  = 6'h12;
  localparam logic [5:0] OP_XORI = 6'h13;
  localparam logic [5:0] OP_SLLI = 6'h14;
  localparam logic [5:0] OP_SRLI = 6'h15;
  localparam logic [5:0] OP_SRAI = 6'h16;
  localparam logic [5:0] OP_SLTI = 6'h17;
  localparam logic [5:0] OP_LUI  = 6'h18;
  localparam logic [5:0] OP_LD   = 6'h20;
  localparam logic [5:0] OP_ST   = 6'h21;
  localparam logic [5:0] OP_BEQ  = 6'h28;
  localparam logic [5:0] OP_BNE  = 6'h29;
  localparam logic [5:0] OP_BLT  = 6'h2A;
  localparam logic [5:0] OP_BGE  = 6'h2B;
  localparam logic [5:0] OP_JAL  = 6'h2C;
  localparam logic [5:0] OP_JR   = 6'h2D;
  localparam logic [5:0] OP_HALT = 6'h3F;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLT, ALU_SLTU, ALU_PASSB
  } alu_op_t;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_JAL, BR_JR
  } br_kind_t;

  // Instruction-type ID kept in the state-saving buffers.
  typedef enum logic [1:0] {
    SK_NONE    = 2'd0,   // produces no register result
    SK_ALU     = 2'd1,   // result produced in EX, value valid
    SK_LD_PEND = 2'd2,   // load, value not yet back from MEM
    SK_LD_DONE = 2'd3    // load, value arrived (the spare ID code)
  } skind_t;

  typedef struct packed {
    skind_t kind;
    ridx_t  rd;
    word_t  value;
  } sentry_t;

  // IF -> DEC link
  typedef struct packed {
    logic  valid;
    logic  sid;      // instruction-stream ID
    word_t pc;
    word_t instr;
  } ifdec_t;

  // DEC -> EX link
  typedef struct packed {
    logic     valid;
    logic     sid;
    word_t    pc;
    alu_op_t  alu_op;
    br_kind_t br;
    logic     use_imm;
    logic     is_load;
    logic     is_store;
    logic     is_halt;
    logic     wr_rd;     // writes a register other than r0
    ridx_t    rd;
    logic     use_rs1;
    ridx_t    rs1;
    word_t    rs1_val;
    logic     use_rs2;
    ridx_t    rs2;
    word_t    rs2_val;
    word_t    imm;
  } decex_t;

  // EX -> MEM link
  typedef struct packed {
    logic  valid;
    logic  is_load;
    logic  is_store;
    logic  wr_rd;
    ridx_t rd;
    word_t result;       // ALU result, or memory byte address
    word_t st_data;
    logic  st_from_mem;  // store data must be taken from the MEM state buffer
    ridx_t st_src;       // register the store data comes from
  } exmem_t;

  // MEM -> WB link and MEM -> EX load feedback
  typedef struct packed {
    logic  valid;
    ridx_t rd;
    word_t value;
  } memwb_t;

  // EX -> IF feedback: branch redirect or flush/reload request
  typedef struct packed {
    logic  valid;
    logic  reload;   // 1: reload the stalled instruction, 0: taken branch
    word_t target;
  } exif_t;

  // Event pulses of the execute stage, one per cycle
  typedef struct packed {
    logic retire;        // instruction executed
    logic drop;          // instruction of a stale stream dropped
    logic flush_branch;  // taken branch: stream flipped, IF redirected
    logic reload;        // load dependency: instruction dropped and re-fetched
    logic byp_alu;       // operand taken from an ALU entry of the buffer
    logic byp_ld;        // operand taken from an arrived load entry
    logic ld_fill;       // load value written into the buffer by the feedback
    logic st_defer;      // store data deferred to the MEM buffer
    logic halted;        // HALT executed (level)
  } ex_ev_t;

  // Event pulses of the memory stage
  typedef struct packed {
    logic load;
    logic store;
    logic stld_fwd;      // store data taken from the MEM state buffer
  } mem_ev_t;

  // Interconnect links
  localparam int unsigned N_LINKS    = 6;
  localparam int unsigned LNK_IF_DEC = 0;
  localparam int unsigned LNK_DEC_EX = 1;
  localparam int unsigned LNK_EX_MEM = 2;
  localparam int unsigned LNK_MEM_WB = 3;
  localparam int unsigned LNK_EX_IF  = 4;
  localparam int unsigned LNK_MEM_EX = 5;

  // Interconnect switch control codes
  typedef enum logic [2:0] {
    SW_PASS     = 3'b000,  // In -> Out, North and South unused
    SW_IN_N     = 3'b001,  // In -> North
    SW_IN_S     = 3'b010,  // In -> South
    SW_N_OUT    = 3'b011,  // North -> Out
    SW_PASS_N2S = 3'b100,  // In -> Out and North -> South
    SW_S_OUT    = 3'b101,  // South -> Out
    SW_PASS_S2N = 3'b110,  // In -> Out and South -> North
    SW_RSVD     = 3'b111   // behaves as SW_PASS
  } sw_ctrl_t;

endpackage
