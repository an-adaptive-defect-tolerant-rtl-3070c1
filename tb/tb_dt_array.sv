// tb_dt_array -- end-to-end test of the 4-core array at its default size.
//
// Phase A, no faults: every switch at 000, four independent cores each run
// their own random program; results are compared with the reference model.
// Phase B, rows 0 and 3 each have defective stages (DEC and MEM of row 0, IF
// and EX of row 3): a new core is built from IF0, DEC3, EX0, MEM3 while rows
// 1 and 2 keep running their own programs; the new core's links pass through
// the switches of rows 1 and 2 with the pass-through codes (100, 110), which
// is the double-use switch case the design relies on. This new core has three
// bubble stages on IF->DEC, DEC->EX, EX->MEM and MEM->EX; its cycle count must
// equal that of a dt_core built with the same bubble counts.
// Phase C, row 1's MEM is defective: row 1 uses the MEM of row 0 (one hop up
// for EX->MEM, one hop down for write-back and the load feedback); rows 2 and
// 3 run unchanged; row 0's own IF, DEC and EX get a HALT-only program so the
// broken row stays idle. Its cycle count must equal that of the matching dt_core.
// Counted mechanisms (each must happen): every switch code 000..110 in use,
// both register directions, branch flush, load reload, stale-stream drop,
// ALU bypass, arrived-load bypass, load fill, store data from the MEM buffer.
// The switch codes, the pass-through use of a switch and the register
// directions follow the description; the programs are this test's own.
module tb_dt_array;
  import dt_pkg::*;
  import dt_tb_pkg::*;

  localparam int N = 4;

  logic clk = 0;
  logic rst_n;
  sw_ctrl_t [N-1:0][N_LINKS-1:0] sw_ctrl;
  logic     [N-2:0][N_LINKS-1:0] reg_dir;
  logic        prog_we;
  logic [1:0]  prog_row;
  logic [9:0]  prog_addr;
  word_t       prog_data;
  logic [1:0]  dbg_row;
  logic [9:0]  dbg_addr;
  word_t       dbg_data;
  logic    [N-1:0] halted;
  ex_ev_t  [N-1:0] ex_ev;
  mem_ev_t [N-1:0] mem_ev;

  // reference single cores with the bubble counts of phases B and C
  logic    ref_we;
  logic    ref_halted_b, ref_halted_c;
  word_t   ref_dbg_b, ref_dbg_c;
  ex_ev_t  ref_ev_b, ref_ev_c;
  mem_ev_t ref_mev_b, ref_mev_c;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_byp_alu, n_byp_ld, n_reload, n_flush, n_drop, n_fill, n_stld;
  int sw_used [8];
  int dir_used [2];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dt_array dut (
    .clk(clk), .rst_n(rst_n), .sw_ctrl(sw_ctrl), .reg_dir(reg_dir),
    .prog_we(prog_we), .prog_row(prog_row), .prog_addr(prog_addr), .prog_data(prog_data),
    .dbg_row(dbg_row), .dbg_addr(dbg_addr), .dbg_data(dbg_data),
    .halted(halted), .ex_ev(ex_ev), .mem_ev(mem_ev)
  );

  dt_core #(.B_IF_DEC(3), .B_DEC_EX(3), .B_EX_MEM(3), .B_MEM_WB(0), .B_EX_IF(0)) u_ref_b (
    .clk(clk), .rst_n(rst_n), .prog_we(ref_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .dbg_addr(dbg_addr), .dbg_data(ref_dbg_b), .halted(ref_halted_b), .ex_ev(ref_ev_b), .mem_ev(ref_mev_b)
  );
  dt_core #(.B_IF_DEC(0), .B_DEC_EX(0), .B_EX_MEM(1), .B_MEM_WB(1), .B_EX_IF(0)) u_ref_c (
    .clk(clk), .rst_n(rst_n), .prog_we(ref_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .dbg_addr(dbg_addr), .dbg_data(ref_dbg_c), .halted(ref_halted_c), .ex_ev(ref_ev_c), .mem_ev(ref_mev_c)
  );

  always @(posedge clk) begin
    if (rst_n) begin
      for (int r = 0; r < N; r++) begin
        if (!halted[r]) begin
          n_byp_alu += int'(ex_ev[r].byp_alu);
          n_byp_ld  += int'(ex_ev[r].byp_ld);
          n_reload  += int'(ex_ev[r].reload);
          n_flush   += int'(ex_ev[r].flush_branch);
          n_drop    += int'(ex_ev[r].drop);
          n_fill    += int'(ex_ev[r].ld_fill);
        end
        n_stld += int'(mem_ev[r].stld_fwd);
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic note_config();
    for (int r = 0; r < N; r++)
      for (int l = 0; l < N_LINKS; l++) sw_used[int'(sw_ctrl[r][l])]++;
  endtask

  task automatic note_dir(int g, int l);
    dir_used[int'(reg_dir[g][l])]++;
  endtask

  task automatic load_row(int row, prog_t p, bit to_ref);
    for (int a = 0; a < 1024; a++) begin
      prog_we   = (row >= 0);
      prog_row  = 2'(row < 0 ? 0 : row);
      ref_we    = to_ref;
      prog_addr = 10'(a);
      prog_data = (a < p.size()) ? p[a] : enc_nop();
      @(negedge clk);
    end
    prog_we = 0;
    ref_we  = 0;
  endtask

  // Compare the words the reference model wrote, read from memory row `mrow`.
  task automatic compare(dt_iss iss, int mrow, string name);
    int n = 0;
    dbg_row = 2'(mrow);
    for (int w = 0; w < TB_MEM; w++) begin
      if (iss.wrote[w]) begin
        dbg_addr = 10'(w);
        #1;
        n++;
        check(dbg_data == iss.dmem[w],
              $sformatf("%s mem[%0d] = %h, expected %h", name, w, dbg_data, iss.dmem[w]));
      end
    end
    check(n >= 15, $sformatf("%s wrote its register dump", name));
  endtask

  // Release reset and wait until the listed EX rows (and the reference core)
  // have halted; return the cycle counts.
  task automatic run(input logic [N-1:0] rows, input int which_ref,
                     output int row_cyc [N], output int ref_cyc);
    int start;
    bit done;
    foreach (row_cyc[r]) row_cyc[r] = -1;
    ref_cyc = -1;
    @(negedge clk);
    rst_n = 1;
    start = cyc;
    do begin
      @(posedge clk);
      #1;
      done = 1;
      for (int r = 0; r < N; r++) begin
        if (rows[r] && halted[r] && row_cyc[r] < 0) row_cyc[r] = cyc - start;
        if (rows[r] && !halted[r]) done = 0;
      end
      if (which_ref == 1) begin
        if (ref_halted_b && ref_cyc < 0) ref_cyc = cyc - start;
        if (!ref_halted_b) done = 0;
      end else if (which_ref == 2) begin
        if (ref_halted_c && ref_cyc < 0) ref_cyc = cyc - start;
        if (!ref_halted_c) done = 0;
      end
    end while (!done && cyc - start < 30000);
    repeat (16) @(posedge clk);
    for (int r = 0; r < N; r++) if (rows[r]) check(row_cyc[r] > 0, $sformatf("row %0d halted", r));
  endtask

  initial begin
    dt_iss iss [N];
    prog_t progs [N];
    int rc [N];
    int refc;

    rst_n = 0; prog_we = 0; ref_we = 0; prog_row = '0; prog_addr = '0; prog_data = '0;
    dbg_row = '0; dbg_addr = '0;
    n_byp_alu = 0; n_byp_ld = 0; n_reload = 0; n_flush = 0; n_drop = 0; n_fill = 0; n_stld = 0;
    foreach (sw_used[i]) sw_used[i] = 0;
    foreach (dir_used[i]) dir_used[i] = 0;

    // ---------------- phase A: fault-free array ----------------
    sw_ctrl = '{default: SW_PASS};
    reg_dir = '0;
    note_config();
    progs[0] = gen_bench_args(3);
    progs[1] = gen_random(50);
    progs[2] = gen_bench_loop(4);
    progs[3] = gen_random(50);
    for (int r = 0; r < N; r++) begin
      iss[r] = new();
      iss[r].load(progs[r]);
      void'(iss[r].run(100000));
      load_row(r, progs[r], 0);
    end
    run(4'b1111, 0, rc, refc);
    for (int r = 0; r < N; r++) compare(iss[r], r, $sformatf("A row%0d", r));
    $display("phase A cycles: %0d %0d %0d %0d", rc[0], rc[1], rc[2], rc[3]);

    // ---------------- phase B: core from IF0, DEC3, EX0, MEM3 ----------------
    rst_n = 0;
    sw_ctrl = '{default: SW_PASS};
    reg_dir = '0;
    // IF0 -> DEC3, down
    sw_ctrl[0][LNK_IF_DEC] = SW_IN_S;  sw_ctrl[1][LNK_IF_DEC] = SW_PASS_N2S;
    sw_ctrl[2][LNK_IF_DEC] = SW_PASS_N2S; sw_ctrl[3][LNK_IF_DEC] = SW_N_OUT;
    // DEC3 -> EX0, up
    sw_ctrl[3][LNK_DEC_EX] = SW_IN_N;  sw_ctrl[2][LNK_DEC_EX] = SW_PASS_S2N;
    sw_ctrl[1][LNK_DEC_EX] = SW_PASS_S2N; sw_ctrl[0][LNK_DEC_EX] = SW_S_OUT;
    for (int g = 0; g < 3; g++) reg_dir[g][LNK_DEC_EX] = 1'b1;
    // EX0 -> MEM3, down
    sw_ctrl[0][LNK_EX_MEM] = SW_IN_S;  sw_ctrl[1][LNK_EX_MEM] = SW_PASS_N2S;
    sw_ctrl[2][LNK_EX_MEM] = SW_PASS_N2S; sw_ctrl[3][LNK_EX_MEM] = SW_N_OUT;
    // MEM3 -> EX0 load feedback, up
    sw_ctrl[3][LNK_MEM_EX] = SW_IN_N;  sw_ctrl[2][LNK_MEM_EX] = SW_PASS_S2N;
    sw_ctrl[1][LNK_MEM_EX] = SW_PASS_S2N; sw_ctrl[0][LNK_MEM_EX] = SW_S_OUT;
    for (int g = 0; g < 3; g++) reg_dir[g][LNK_MEM_EX] = 1'b1;
    note_config();
    for (int g = 0; g < 3; g++) begin note_dir(g, LNK_DEC_EX); note_dir(g, LNK_IF_DEC); end

    progs[0] = gen_random(60);
    progs[1] = gen_bench_raw(3);
    progs[2] = gen_random(50);
    for (int r = 0; r < 3; r++) begin
      iss[r] = new();
      iss[r].load(progs[r]);
      void'(iss[r].run(100000));
    end
    load_row(0, progs[0], 1);
    load_row(1, progs[1], 0);
    load_row(2, progs[2], 0);
    run(4'b0111, 1, rc, refc);
    compare(iss[0], 3, "B new core (data in row 3)");
    compare(iss[1], 1, "B row1");
    compare(iss[2], 2, "B row2");
    check(rc[0] == refc, $sformatf("B new core cycles %0d, single-core model with the same bubbles %0d", rc[0], refc));
    $display("phase B cycles: new core %0d (model %0d), row1 %0d, row2 %0d", rc[0], refc, rc[1], rc[2]);

    // ---------------- phase C: row 1 uses MEM of row 0 ----------------
    rst_n = 0;
    sw_ctrl = '{default: SW_PASS};
    reg_dir = '0;
    sw_ctrl[1][LNK_EX_MEM] = SW_IN_N;  sw_ctrl[0][LNK_EX_MEM] = SW_S_OUT;
    reg_dir[0][LNK_EX_MEM] = 1'b1;
    sw_ctrl[0][LNK_MEM_WB] = SW_IN_S;  sw_ctrl[1][LNK_MEM_WB] = SW_N_OUT;
    sw_ctrl[0][LNK_MEM_EX] = SW_IN_S;  sw_ctrl[1][LNK_MEM_EX] = SW_N_OUT;
    note_config();
    note_dir(0, LNK_EX_MEM); note_dir(0, LNK_MEM_WB);

    progs[1] = gen_bench_args(2);
    progs[2] = gen_bench_branch(3);
    progs[3] = gen_random(40);
    for (int r = 1; r < 4; r++) begin
      iss[r] = new();
      iss[r].load(progs[r]);
      void'(iss[r].run(100000));
    end
    progs[0] = '{enc_halt()};      // row 0's remaining stages are left idle
    load_row(0, progs[0], 0);
    load_row(1, progs[1], 1);
    load_row(2, progs[2], 0);
    load_row(3, progs[3], 0);
    run(4'b1110, 2, rc, refc);
    compare(iss[1], 0, "C row1 core (data in row 0)");
    compare(iss[2], 2, "C row2");
    compare(iss[3], 3, "C row3");
    check(rc[1] == refc, $sformatf("C row1 cycles %0d, single-core model with the same bubbles %0d", rc[1], refc));
    $display("phase C cycles: row1 %0d (model %0d), row2 %0d, row3 %0d", rc[1], refc, rc[2], rc[3]);

    // ---------------- mechanisms ----------------
    for (int c = 0; c < 7; c++) check(sw_used[c] > 0, $sformatf("switch code %03b used", 3'(c)));
    check(dir_used[0] > 0 && dir_used[1] > 0, "registers used in both directions");
    check(n_byp_alu > 0, "ALU bypass seen");
    check(n_byp_ld  > 0, "arrived-load bypass seen");
    check(n_reload  > 0, "flush/reload seen");
    check(n_flush   > 0, "branch flush seen");
    check(n_drop    > 0, "stale-stream drop seen");
    check(n_fill    > 0, "load fill seen");
    check(n_stld    > 0, "store data from MEM buffer seen");
    $display("events: byp_alu %0d byp_ld %0d reload %0d flush %0d drop %0d fill %0d stld %0d",
             n_byp_alu, n_byp_ld, n_reload, n_flush, n_drop, n_fill, n_stld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
