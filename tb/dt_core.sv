// dt_core -- one defect-tolerant pipeline, with the interconnect hops of a
// reconfigured core modelled as plain register chains.
//
// The four decoupled stages (if_stage, dec_stage, ex_stage, mem_stage) are
// joined by the six links of a core. Each link is a pipe_delay whose length is
// the number of interconnect hops that link crosses in a given configuration,
// i.e. the bubble stages it adds. With all lengths 0 this is the fault-free
// core, which behaves like a classic 5-stage pipeline with full bypassing. A
// core assembled from stages of different rows of a 4-core array is modelled
// by setting the hop counts of its links, for example using the EX stage of
// the neighbouring row gives B_DEC_EX = 1 and B_EX_MEM = 1.
// The MEM->EX feedback crosses the same rows as the EX->MEM link, so it gets
// the same length. The write-back link ends at the DEC stage that decoded the
// instruction.
//
// The stages never stall and no signal spans more than one link: all control
// is local (stream IDs, flush/reload, state-saving buffers).
// This is a test model, used only by the testbenches: it lets one
// reconfigured core be simulated without the switch fabric, and serves as the
// cycle-count reference for cores built through the switches of dt_array.
// Interface: host program write (prog_*), host data read (dbg_*, asynchronous),
// halted and the event pulses of EX and MEM. Timing: reset release to the
// first instruction leaving IF is one cycle; every link adds its hop count in
// cycles.
module dt_core #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned B_IF_DEC   = 0,   // hops IF -> DEC
  parameter int unsigned B_DEC_EX   = 0,   // hops DEC -> EX
  parameter int unsigned B_EX_MEM   = 0,   // hops EX -> MEM (and MEM -> EX)
  parameter int unsigned B_MEM_WB   = 0,   // hops MEM -> DEC (write-back)
  parameter int unsigned B_EX_IF    = 0,   // hops EX -> IF
  localparam int unsigned IAW       = $clog2(IMEM_WORDS),
  localparam int unsigned DAW       = $clog2(DMEM_WORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [IAW-1:0]  prog_addr,
  input  dt_pkg::word_t   prog_data,
  input  logic [DAW-1:0]  dbg_addr,
  output dt_pkg::word_t   dbg_data,
  output logic            halted,
  output dt_pkg::ex_ev_t  ex_ev,
  output dt_pkg::mem_ev_t mem_ev
);
  import dt_pkg::*;

  ifdec_t if_out, dec_in;
  decex_t dec_out, ex_in;
  exmem_t ex_out, mem_in;
  memwb_t mem_wb, dec_wb, mem_fb, ex_memfb;
  exif_t  ex_fb, if_fb;

  if_stage #(.IMEM_WORDS(IMEM_WORDS)) u_if (
    .clk(clk), .rst_n(rst_n), .fb(if_fb), .out(if_out),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data)
  );

  dec_stage u_dec (
    .clk(clk), .rst_n(rst_n), .in(dec_in), .wb(dec_wb), .out(dec_out)
  );

  ex_stage #(.FIFO_DEPTH(FIFO_DEPTH)) u_ex (
    .clk(clk), .rst_n(rst_n), .in(ex_in), .memfb(ex_memfb),
    .out(ex_out), .fb(ex_fb), .ev(ex_ev), .halted(halted)
  );

  mem_stage #(.DMEM_WORDS(DMEM_WORDS), .FIFO_DEPTH(FIFO_DEPTH)) u_mem (
    .clk(clk), .rst_n(rst_n), .in(mem_in), .wb(mem_wb), .fb(mem_fb),
    .ev(mem_ev), .dbg_addr(dbg_addr), .dbg_data(dbg_data)
  );

  pipe_delay #(.T(ifdec_t), .STAGES(B_IF_DEC)) u_l_ifdec (.clk(clk), .rst_n(rst_n), .d(if_out),  .q(dec_in));
  pipe_delay #(.T(decex_t), .STAGES(B_DEC_EX)) u_l_decex (.clk(clk), .rst_n(rst_n), .d(dec_out), .q(ex_in));
  pipe_delay #(.T(exmem_t), .STAGES(B_EX_MEM)) u_l_exmem (.clk(clk), .rst_n(rst_n), .d(ex_out),  .q(mem_in));
  pipe_delay #(.T(memwb_t), .STAGES(B_MEM_WB)) u_l_memwb (.clk(clk), .rst_n(rst_n), .d(mem_wb),  .q(dec_wb));
  pipe_delay #(.T(exif_t),  .STAGES(B_EX_IF))  u_l_exif  (.clk(clk), .rst_n(rst_n), .d(ex_fb),   .q(if_fb));
  pipe_delay #(.T(memwb_t), .STAGES(B_EX_MEM)) u_l_memex (.clk(clk), .rst_n(rst_n), .d(mem_fb),  .q(ex_memfb));

endmodule
