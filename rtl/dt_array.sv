// dt_array -- the defect-tolerant multiprocessor array (top level).
//
// N_CORES rows, each holding the four decoupled stages of one 5-stage RISC
// core (IF, DEC with the register file and the write-back, EX, MEM). The six
// links of every row (IF->DEC, DEC->EX, EX->MEM, MEM->WB, EX->IF, MEM->EX) each
// pass through one ic_switch; the switches of one link type form a column
// joined through bidir_reg pipeline registers between neighbouring rows
// (link_column). With all switches at 000 every row is an independent core.
// When a stage is defective, the switch controls route its row's data through
// the same stage of another row; every row crossed adds one register (bubble)
// stage. The cores cope with the resulting variable pipeline length locally:
// stream IDs and flush/reload for control and load hazards, state-saving
// buffers for bypassing. No global stall or flush exists.
//
// Configuration: sw_ctrl[row][link] (3-bit switch codes, see ic_switch) and
// reg_dir[gap][link] (0 = down, 1 = up; gap g sits between rows g and g+1) are
// static; change them only while rst_n is low. Choosing them (which stages to
// combine after a fault) is done outside the array.
//
// Host ports: prog_* writes a row's program memory, dbg_* reads a row's data
// memory. Status: halted and event pulses of each row's EX and MEM stage.
//
// Counts: 4 x 4 = 16 pipeline switches, 4 x 2 = 8 feedback switches, as in the
// description. Bidirectional registers: one per link type per gap between
// rows, 6 x 3 = 18 for 4 rows (see README for the difference to 24).
module dt_array #(
  parameter int unsigned N_CORES    = 4,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned FIFO_DEPTH = 2 * N_CORES,
  localparam int unsigned IAW       = $clog2(IMEM_WORDS),
  localparam int unsigned DAW       = $clog2(DMEM_WORDS),
  localparam int unsigned RW        = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  dt_pkg::sw_ctrl_t [N_CORES-1:0][dt_pkg::N_LINKS-1:0] sw_ctrl,
  input  logic             [N_CORES-2:0][dt_pkg::N_LINKS-1:0] reg_dir,
  input  logic                                         prog_we,
  input  logic [RW-1:0]                                prog_row,
  input  logic [IAW-1:0]                               prog_addr,
  input  dt_pkg::word_t                                prog_data,
  input  logic [RW-1:0]                                dbg_row,
  input  logic [DAW-1:0]                               dbg_addr,
  output dt_pkg::word_t                                dbg_data,
  output logic             [N_CORES-1:0]               halted,
  output dt_pkg::ex_ev_t   [N_CORES-1:0]               ex_ev,
  output dt_pkg::mem_ev_t  [N_CORES-1:0]               mem_ev
);
  import dt_pkg::*;

  ifdec_t [N_CORES-1:0] if_out, dec_in;
  decex_t [N_CORES-1:0] dec_out, ex_in;
  exmem_t [N_CORES-1:0] ex_out, mem_in;
  memwb_t [N_CORES-1:0] mem_wb, dec_wb, mem_fb, ex_memfb;
  exif_t  [N_CORES-1:0] ex_fb, if_fb;
  word_t  [N_CORES-1:0] row_dbg;

  // Per-link slices of the configuration
  sw_ctrl_t [N_LINKS-1:0][N_CORES-1:0] ctrl_l;
  logic     [N_LINKS-1:0][N_CORES-2:0] dir_l;

  for (genvar l = 0; l < N_LINKS; l++) begin : g_cfg
    for (genvar r = 0; r < N_CORES; r++) begin : g_r
      assign ctrl_l[l][r] = sw_ctrl[r][l];
    end
    for (genvar g = 0; g < N_CORES - 1; g++) begin : g_g
      assign dir_l[l][g] = reg_dir[g][l];
    end
  end

  for (genvar r = 0; r < N_CORES; r++) begin : g_row
    if_stage #(.IMEM_WORDS(IMEM_WORDS)) u_if (
      .clk(clk), .rst_n(rst_n), .fb(if_fb[r]), .out(if_out[r]),
      .prog_we(prog_we && prog_row == RW'(r)), .prog_addr(prog_addr), .prog_data(prog_data)
    );

    dec_stage u_dec (
      .clk(clk), .rst_n(rst_n), .in(dec_in[r]), .wb(dec_wb[r]), .out(dec_out[r])
    );

    ex_stage #(.FIFO_DEPTH(FIFO_DEPTH)) u_ex (
      .clk(clk), .rst_n(rst_n), .in(ex_in[r]), .memfb(ex_memfb[r]),
      .out(ex_out[r]), .fb(ex_fb[r]), .ev(ex_ev[r]), .halted(halted[r])
    );

    mem_stage #(.DMEM_WORDS(DMEM_WORDS), .FIFO_DEPTH(FIFO_DEPTH)) u_mem (
      .clk(clk), .rst_n(rst_n), .in(mem_in[r]), .wb(mem_wb[r]), .fb(mem_fb[r]),
      .ev(mem_ev[r]), .dbg_addr(dbg_addr), .dbg_data(row_dbg[r])
    );
  end

  assign dbg_data = row_dbg[dbg_row];

  link_column #(.T(ifdec_t), .N_CORES(N_CORES)) u_col_ifdec (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl_l[LNK_IF_DEC]), .dir(dir_l[LNK_IF_DEC]), .src(if_out), .dst(dec_in));
  link_column #(.T(decex_t), .N_CORES(N_CORES)) u_col_decex (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl_l[LNK_DEC_EX]), .dir(dir_l[LNK_DEC_EX]), .src(dec_out), .dst(ex_in));
  link_column #(.T(exmem_t), .N_CORES(N_CORES)) u_col_exmem (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl_l[LNK_EX_MEM]), .dir(dir_l[LNK_EX_MEM]), .src(ex_out), .dst(mem_in));
  link_column #(.T(memwb_t), .N_CORES(N_CORES)) u_col_memwb (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl_l[LNK_MEM_WB]), .dir(dir_l[LNK_MEM_WB]), .src(mem_wb), .dst(dec_wb));
  link_column #(.T(exif_t), .N_CORES(N_CORES)) u_col_exif (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl_l[LNK_EX_IF]), .dir(dir_l[LNK_EX_IF]), .src(ex_fb), .dst(if_fb));
  link_column #(.T(memwb_t), .N_CORES(N_CORES)) u_col_memex (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl_l[LNK_MEM_EX]), .dir(dir_l[LNK_MEM_EX]), .src(mem_fb), .dst(ex_memfb));

endmodule
