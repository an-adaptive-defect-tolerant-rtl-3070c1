// link_column -- one link type of the interconnect across all cores.
//
// For one of the six links of a core (IF->DEC, DEC->EX, EX->MEM, MEM->WB,
// EX->IF, MEM->EX), this places one ic_switch per core row and one bidir_reg
// between each pair of neighbouring rows, and wires the switches' vertical
// ports through the registers. Row 0 is the top row; the North ports of row 0
// and the South ports of the last row are unconnected (read as zero).
// With every switch at 000 each core's stages talk to each other directly with
// no added latency; a route that crosses k rows gains k register stages.
// Interface: ctrl[row] and dir[gap] configure the column; src[row] is the
// payload leaving the producing stage of each row, dst[row] the payload
// reaching the consuming stage. Combinational from src to dst on a local
// route, plus one clock per register crossed.
// Switches in every row, registers between rows and the two vertical
// directions follow the description; placing exactly one register per link
// and per gap (rather than its count of 24 for four rows) is this design's
// choice, see README.
module link_column #(
  parameter type         T       = logic [7:0],
  parameter int unsigned N_CORES = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  dt_pkg::sw_ctrl_t [N_CORES-1:0] ctrl,
  input  logic             [N_CORES-2:0] dir,
  input  T                 [N_CORES-1:0] src,   // producing stage of each row
  output T                 [N_CORES-1:0] dst    // consuming stage of each row
);
  T [N_CORES-1:0] n_in, n_out, s_in, s_out;
  T [N_CORES-2:0] hop_q;

  for (genvar r = 0; r < N_CORES; r++) begin : g_sw
    ic_switch #(.T(T)) u_sw (
      .ctrl (ctrl[r]),
      .in_d (src[r]),
      .out_d(dst[r]),
      .n_in (n_in[r]),
      .n_out(n_out[r]),
      .s_in (s_in[r]),
      .s_out(s_out[r])
    );
  end

  for (genvar g = 0; g < N_CORES - 1; g++) begin : g_hop
    bidir_reg #(.T(T)) u_reg (
      .clk    (clk),
      .rst_n  (rst_n),
      .dir    (dir[g]),
      .from_up(s_out[g]),
      .from_dn(n_out[g+1]),
      .q      (hop_q[g])
    );
    assign s_in[g]   = hop_q[g];
    assign n_in[g+1] = hop_q[g];
  end

  assign n_in[0]         = '0;
  assign s_in[N_CORES-1] = '0;

endmodule
