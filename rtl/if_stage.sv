// if_stage -- instruction fetch with the local half of the flush/reload scheme.
//
// Holds the PC, the fetch stream-ID register and the program memory. Each cycle
// it fetches one instruction and sends {valid, stream ID, PC, instruction} to
// the IF->DEC link through its output register. Branches are predicted not
// taken, so the normal next PC is PC+4.
//
// The only control input is the EX->IF feedback. When it carries a request
// (taken branch, or reload of an instruction that had to wait for a load
// value) the stage flips its stream-ID register and fetches from the address
// on the feedback in that same cycle; instructions fetched from then on carry
// the new ID, and the execute stage drops every instruction still carrying
// the old one. No stall or flush signal reaches this stage from anywhere else.
//
// Timing: the feedback acts combinationally on the fetch address, so with a
// direct EX->IF link a taken branch in EX in cycle t has its target in the
// IF/DEC register at t+1: only the instruction then in DEC is lost. A reload
// loses two cycles (the reloaded instruction's own slot and the one behind it). Bubble stages on the feedback link delay it by one cycle each.
// The stream-ID flip, the reload of the stalled instruction's PC and the PC
// priority (reload/branch, else PC+4) follow the description; the reset PC of
// 0 and the host program-load port are this design's choices.
module if_stage #(
  parameter int unsigned IMEM_WORDS = 1024,
  localparam int unsigned AW        = $clog2(IMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dt_pkg::exif_t  fb,        // from EX: redirect / reload
  output dt_pkg::ifdec_t out,       // to the IF->DEC link
  input  logic           prog_we,   // host program load
  input  logic [AW-1:0]  prog_addr,
  input  dt_pkg::word_t  prog_data
);
  import dt_pkg::*;

  word_t pc_q;
  logic  sid_q;
  word_t fetch_pc;
  logic  fetch_sid;
  word_t instr;

  assign fetch_pc  = fb.valid ? fb.target : pc_q;
  assign fetch_sid = fb.valid ? ~sid_q    : sid_q;

  prog_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk  (clk),
    .we   (prog_we),
    .waddr(prog_addr),
    .wdata(prog_data),
    .raddr(fetch_pc[AW+1:2]),
    .rdata(instr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      sid_q <= 1'b0;
      out   <= '0;
    end else begin
      pc_q      <= fetch_pc + 32'd4;
      sid_q     <= fetch_sid;
      out.valid <= 1'b1;
      out.sid   <= fetch_sid;
      out.pc    <= fetch_pc;
      out.instr <= instr;
    end
  end

endmodule
