// prog_mem -- program memory of one fetch stage.
//
// WORDS x 32-bit words, asynchronous read addressed by word, one synchronous
// write port through which a host loads the program before reset is released.
// The fetch stage reads the instruction in the same cycle it forms the PC, so
// an instruction fetched in cycle t is in the IF/DEC register at t+1.
// A program memory inside the fetch stage follows the description; its size,
// read timing and the load port are this design's choices.
module prog_mem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  dt_pkg::word_t wdata,
  input  logic [AW-1:0] raddr,
  output dt_pkg::word_t rdata
);
  dt_pkg::word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
