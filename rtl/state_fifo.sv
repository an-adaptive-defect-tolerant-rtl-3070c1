// state_fifo -- pipeline state-saving buffer used for bypassing.
//
// A shift register of DEPTH entries {type ID, destination register, value}
// that mirrors the instructions that have left the owning stage: every cycle
// (when shift_en is high) the entry of the instruction now leaving the stage
// enters at position 0 and the oldest entry drops out of position DEPTH-1. An
// empty cycle or an instruction without a register result pushes a NONE entry,
// so position k always stands for "the stage k+1 cycles downstream".
//
// Two lookup ports search the buffer for the youngest entry whose destination
// equals the queried register and return its type and value. The type tells
// the consumer whether the value is usable (ALU result or arrived load) or
// still pending (load whose value has not come back from MEM).
//
// The fill port takes the load value arriving on the MEM->EX feedback and
// writes it into the oldest pending-load entry, turning it into an arrived
// load (the spare type code). Loads leave MEM in program order and a dropped
// instruction never reaches MEM, so the oldest pending load is always the one
// the value belongs to. A fill in cycle t is already visible to the lookups of
// cycle t.
//
// Timing: lookups are combinational; the buffer updates on the clock edge.
// The buffer structure, the 2-bit type ID with its spare code, the per-stage
// shifting and the MEM->EX fill follow the design description. Matching the
// fill to the oldest pending load (instead of a tag) is this design's choice.
// The assertions below are disabled during reset with rst_n; lint reports
// rst_n as used both asynchronously (flop reset) and synchronously (the
// assertions' disable condition). The assertions generate no logic.
module state_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NQ    = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       shift_en,
  input  dt_pkg::sentry_t            push,
  input  logic                       fill_valid,
  input  dt_pkg::ridx_t              fill_rd,
  input  dt_pkg::word_t              fill_value,
  input  dt_pkg::ridx_t   [NQ-1:0]   q_reg,
  output logic            [NQ-1:0]   q_hit,
  output dt_pkg::skind_t  [NQ-1:0]   q_kind,
  output dt_pkg::word_t   [NQ-1:0]   q_value,
  output logic                       fill_hit  // a pending load took the fill
);
  import dt_pkg::*;

  sentry_t [DEPTH-1:0] ent_q, ent_eff;

  // Apply this cycle's fill to the oldest pending load.
  always_comb begin
    int sel;
    sel     = -1;
    ent_eff = ent_q;
    for (int i = 0; i < DEPTH; i++) begin
      if (ent_q[i].kind == SK_LD_PEND) sel = i;
    end
    fill_hit = 1'b0;
    if (fill_valid && sel >= 0 && ent_q[sel].rd == fill_rd) begin
      ent_eff[sel].kind  = SK_LD_DONE;
      ent_eff[sel].value = fill_value;
      fill_hit           = 1'b1;
    end
  end

  // Youngest match for each query.
  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      q_hit[q]   = 1'b0;
      q_kind[q]  = SK_NONE;
      q_value[q] = '0;
      for (int i = DEPTH - 1; i >= 0; i--) begin
        if (ent_eff[i].kind != SK_NONE && ent_eff[i].rd == q_reg[q] && q_reg[q] != '0) begin
          q_hit[q]   = 1'b1;
          q_kind[q]  = ent_eff[i].kind;
          q_value[q] = ent_eff[i].value;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_q <= '0;
    end else if (shift_en) begin
      ent_q <= {ent_eff[DEPTH-2:0], push};
    end else begin
      ent_q <= ent_eff;
    end
  end

  // A load value must always find its pending entry, and must belong to it.
  a_fill_hits: assert property (@(posedge clk) disable iff (!rst_n) fill_valid |-> fill_hit)
    else $error("state_fifo: load value arrived with no matching pending load entry");

  // A pending load must never drop out of the buffer.
  a_no_pend_drop: assert property (@(posedge clk) disable iff (!rst_n)
                                   shift_en |-> ent_eff[DEPTH-1].kind != SK_LD_PEND)
    else $error("state_fifo: pending load dropped before its value arrived");

endmodule
