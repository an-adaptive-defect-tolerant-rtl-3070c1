// regfile -- the 16 x 32-bit register file of the decode stage.
//
// Register 0 always reads zero. Two asynchronous read ports serve the
// instruction in DEC; one write port is driven by the write-back link, which in
// this design is only wires of the interconnect ending at the decode stage.
// A write in cycle t is visible to a read in the same cycle (write-through), so
// an instruction decoded while its producer writes back gets the new value.
// 16 registers and r0 = 0 follow the description; write-through and the reset
// of all registers to zero are this design's choices.
module regfile (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  dt_pkg::ridx_t waddr,
  input  dt_pkg::word_t wdata,
  input  dt_pkg::ridx_t raddr1,
  output dt_pkg::word_t rdata1,
  input  dt_pkg::ridx_t raddr2,
  output dt_pkg::word_t rdata2
);
  import dt_pkg::*;

  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic word_t rd_port(ridx_t a);
    if (a == '0)                 return '0;
    else if (we && waddr == a)   return wdata;
    else                         return regs[a];
  endfunction

  assign rdata1 = rd_port(raddr1);
  assign rdata2 = rd_port(raddr2);
endmodule
