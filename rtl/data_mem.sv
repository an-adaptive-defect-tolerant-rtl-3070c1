// data_mem -- data memory of one memory stage.
//
// WORDS x 32-bit words, word addressed. Port A belongs to the memory stage:
// asynchronous read and a synchronous write in the same cycle. Port B is a
// read-only observation port for a host (asynchronous read).
// A load in MEM during cycle t therefore has its value registered at t+1.
// The description places the data memory in the MEM stage; its size, read
// timing and the host port are this design's choices.
module data_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  dt_pkg::word_t wdata,
  output dt_pkg::word_t rdata,
  input  logic [AW-1:0] dbg_addr,
  output dt_pkg::word_t dbg_rdata
);
  dt_pkg::word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata     = mem[addr];
  assign dbg_rdata = mem[dbg_addr];
endmodule
