// mem_stage -- memory stage with the store/load state-saving buffer.
//
// Executes loads and stores on its data memory and sends {rd, value} of every
// register-writing instruction to the MEM->WB link through its output register.
// The same register feeds the MEM->EX feedback link, which carries only load
// values; the execute stage writes them into its own state-saving buffer.
//
// A second state-saving buffer (state_fifo, FIFO_DEPTH entries) mirrors the
// instructions that have left this stage. A store whose data register was
// still waiting on a load when the store passed EX arrives with st_from_mem
// set; its data is then the youngest buffer entry writing that register, which
// lets a load->store dependency complete without a reload.
//
// Timing: one cycle, output registered. Memory address = result[.. :2] (word
// addressed). A store writes at the end of its MEM cycle.
// Following the description: data memory in MEM, value feedback from MEM to
// EX, and a MEM buffer as deep as the EX buffer serving store/load
// dependencies. This design's own choices: the feedback taken from the stage's
// output register and the host observation port of the data memory.
// The assertions below are disabled during reset with rst_n; lint reports
// rst_n as used both asynchronously (flop reset) and synchronously (the
// assertions' disable condition). The assertions generate no logic.
module mem_stage #(
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned AW        = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  dt_pkg::exmem_t  in,
  output dt_pkg::memwb_t  wb,        // to the MEM->WB link
  output dt_pkg::memwb_t  fb,        // to the MEM->EX link (loads only)
  output dt_pkg::mem_ev_t ev,
  input  logic [AW-1:0]   dbg_addr,
  output dt_pkg::word_t   dbg_data
);
  import dt_pkg::*;

  word_t   rdata, st_data, value;
  sentry_t push;
  logic    out_valid_q, out_load_q;
  ridx_t   out_rd_q;
  word_t   out_val_q;

  ridx_t  [0:0] q_reg;
  logic   [0:0] q_hit;
  skind_t [0:0] q_kind;
  word_t  [0:0] q_value;
  logic         unused_fill_hit;

  assign q_reg[0] = in.st_from_mem ? in.st_src : '0;

  state_fifo #(.DEPTH(FIFO_DEPTH), .NQ(1)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (1'b1),
    .push      (push),
    .fill_valid(1'b0),
    .fill_rd   ('0),
    .fill_value('0),
    .q_reg     (q_reg),
    .q_hit     (q_hit),
    .q_kind    (q_kind),
    .q_value   (q_value),
    .fill_hit  (unused_fill_hit)
  );

  assign st_data = (in.st_from_mem && q_hit[0]) ? q_value[0] : in.st_data;

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk      (clk),
    .we       (in.valid && in.is_store),
    .addr     (in.result[AW+1:2]),
    .wdata    (st_data),
    .rdata    (rdata),
    .dbg_addr (dbg_addr),
    .dbg_rdata(dbg_data)
  );

  assign value = in.is_load ? rdata : in.result;

  always_comb begin
    push = '0;
    if (in.valid && in.wr_rd) begin
      push.kind  = in.is_load ? SK_LD_DONE : SK_ALU;
      push.rd    = in.rd;
      push.value = value;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_q <= 1'b0;
      out_load_q  <= 1'b0;
      out_rd_q    <= '0;
      out_val_q   <= '0;
    end else begin
      out_valid_q <= in.valid && in.wr_rd;
      out_load_q  <= in.is_load;
      out_rd_q    <= in.rd;
      out_val_q   <= value;
    end
  end

  assign wb = '{valid: out_valid_q,               rd: out_rd_q, value: out_val_q};
  assign fb = '{valid: out_valid_q && out_load_q, rd: out_rd_q, value: out_val_q};

  always_comb begin
    ev          = '0;
    ev.load     = in.valid && in.is_load;
    ev.store    = in.valid && in.is_store;
    ev.stld_fwd = in.valid && in.is_store && in.st_from_mem && q_hit[0];
  end

  // A deferred store must find its data in the buffer.
  a_defer_hit: assert property (@(posedge clk) disable iff (!rst_n)
                                (in.valid && in.is_store && in.st_from_mem) |-> (q_hit[0] && q_kind[0] != SK_LD_PEND))
    else $error("mem_stage: deferred store data not found in the state buffer");

endmodule
