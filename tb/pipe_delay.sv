// pipe_delay -- a chain of STAGES plain registers (STAGES = 0 is a wire); a
// test helper used by the single-core model dt_core.
//
// Stands in for the pipelined interconnect wires of a reconfigured core when a
// single core is simulated on its own: each register is one bubble stage that
// the interconnect would add for one hop between neighbouring cores.
// Reset clears every register, i.e. no valid data in flight.
// Interface: d in, q out, STAGES clocks of latency. The hop-per-register
// model follows the description's pipelined interconnect.
module pipe_delay #(
  parameter type         T      = logic [7:0],
  parameter int unsigned STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  T     d,
  output T     q
);
  if (STAGES == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    T [STAGES-1:0] r;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) r <= '0;
      else begin
        r[0] <= d;
        for (int i = 1; i < STAGES; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[STAGES-1];
  end
endmodule
