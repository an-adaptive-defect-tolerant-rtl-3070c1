// tb_workloads -- runs the four micro-benchmark kinds on the full-size 4-core
// array in the fault-free configuration and in the two worst-case
// reconfigurations, and reports execution cycles.
//
// Benchmarks (sized to about 1000-2000 cycles on the fault-free core):
// function-argument heavy, read-after-write heavy, non-taken-branch heavy,
// and an empty for-loop. Each runs on the core of row 0 while the other rows
// hold a HALT-only program. Configurations, set through the switch codes:
//   fault-free  all switches 000
//   worst 1     row 0 uses the MEM stage of row 3: EX->MEM crosses three
//               registers down, write-back and load feedback three up
//   worst 2     row 0 uses the DEC and MEM stages of row 3: IF->DEC, EX->MEM
//               three down, DEC->EX and load feedback three up
// Checks: the final registers and memory words match the reference model in
// every configuration; the fault-free run takes exactly steps + taken
// branches + 2 per reload + 2 cycles; a worst case is never faster than the
// fault-free run. Printed: the cycle table and the overhead of flush/reload
// against a pipeline that stalls one cycle per load-use instead of two.
// The benchmark kinds, their size and the two worst cases follow the
// description; the programs themselves are written for this design's ISA.
module tb_workloads;
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

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dt_array dut (
    .clk(clk), .rst_n(rst_n), .sw_ctrl(sw_ctrl), .reg_dir(reg_dir),
    .prog_we(prog_we), .prog_row(prog_row), .prog_addr(prog_addr), .prog_data(prog_data),
    .dbg_row(dbg_row), .dbg_addr(dbg_addr), .dbg_data(dbg_data),
    .halted(halted), .ex_ev(ex_ev), .mem_ev(mem_ev)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_row(int row, prog_t p);
    for (int a = 0; a < 1024; a++) begin
      prog_we = 1; prog_row = 2'(row); prog_addr = 10'(a);
      prog_data = (a < p.size()) ? p[a] : enc_nop();
      @(negedge clk);
    end
    prog_we = 0;
  endtask

  // 0 fault-free, 1 worst case 1, 2 worst case 2
  task automatic configure(int c);
    sw_ctrl = '{default: SW_PASS};
    reg_dir = '0;
    if (c >= 1) begin
      sw_ctrl[0][LNK_EX_MEM] = SW_IN_S;     sw_ctrl[1][LNK_EX_MEM] = SW_PASS_N2S;
      sw_ctrl[2][LNK_EX_MEM] = SW_PASS_N2S; sw_ctrl[3][LNK_EX_MEM] = SW_N_OUT;
      sw_ctrl[3][LNK_MEM_EX] = SW_IN_N;     sw_ctrl[2][LNK_MEM_EX] = SW_PASS_S2N;
      sw_ctrl[1][LNK_MEM_EX] = SW_PASS_S2N; sw_ctrl[0][LNK_MEM_EX] = SW_S_OUT;
      for (int g = 0; g < 3; g++) reg_dir[g][LNK_MEM_EX] = 1'b1;
    end
    if (c == 1) begin
      sw_ctrl[3][LNK_MEM_WB] = SW_IN_N;     sw_ctrl[2][LNK_MEM_WB] = SW_PASS_S2N;
      sw_ctrl[1][LNK_MEM_WB] = SW_PASS_S2N; sw_ctrl[0][LNK_MEM_WB] = SW_S_OUT;
      for (int g = 0; g < 3; g++) reg_dir[g][LNK_MEM_WB] = 1'b1;
    end
    if (c == 2) begin
      sw_ctrl[0][LNK_IF_DEC] = SW_IN_S;     sw_ctrl[1][LNK_IF_DEC] = SW_PASS_N2S;
      sw_ctrl[2][LNK_IF_DEC] = SW_PASS_N2S; sw_ctrl[3][LNK_IF_DEC] = SW_N_OUT;
      sw_ctrl[3][LNK_DEC_EX] = SW_IN_N;     sw_ctrl[2][LNK_DEC_EX] = SW_PASS_S2N;
      sw_ctrl[1][LNK_DEC_EX] = SW_PASS_S2N; sw_ctrl[0][LNK_DEC_EX] = SW_S_OUT;
      for (int g = 0; g < 3; g++) reg_dir[g][LNK_DEC_EX] = 1'b1;
    end
  endtask

  task automatic run_one(prog_t p, dt_iss iss, int c, string name, output int cycles, output int reloads);
    int start, n;
    rst_n = 0;
    configure(c);
    @(negedge clk);
    load_row(0, p);
    @(negedge clk);
    rst_n = 1;
    start = cyc;
    reloads = 0;
    do begin
      @(posedge clk); #1;
      if (!halted[0]) reloads += int'(ex_ev[0].reload);
    end while (!halted[0] && cyc - start < 20000);
    cycles = cyc - start;
    check(halted[0], $sformatf("%s cfg%0d halted", name, c));
    repeat (16) @(posedge clk);
    dbg_row = (c == 0) ? 2'd0 : 2'd3;
    n = 0;
    for (int w = 0; w < TB_MEM; w++) begin
      if (iss.wrote[w]) begin
        dbg_addr = 10'(w);
        #1;
        n++;
        check(dbg_data == iss.dmem[w], $sformatf("%s cfg%0d mem[%0d] = %h, expected %h", name, c, w, dbg_data, iss.dmem[w]));
      end
    end
    check(n >= 15, $sformatf("%s cfg%0d register dump written", name, c));
  endtask

  initial begin
    prog_t progs [4];
    string names [4] = '{"args", "raw", "branch", "loop"};
    prog_t idle;
    dt_iss iss;
    int cyc_tab [4][3];
    int rl [4][3];

    rst_n = 0; prog_we = 0; prog_row = '0; prog_addr = '0; prog_data = '0; dbg_row = '0; dbg_addr = '0;
    sw_ctrl = '{default: SW_PASS}; reg_dir = '0;
    idle = '{enc_halt()};
    for (int r = 1; r < N; r++) load_row(r, idle);

    progs[0] = gen_bench_args(30);
    progs[1] = gen_bench_raw(40);
    progs[2] = gen_bench_branch(60);
    progs[3] = gen_bench_loop(150);

    for (int b = 0; b < 4; b++) begin
      iss = new();
      iss.load(progs[b]);
      void'(iss.run(100000));
      begin
        int nd;
        nd = 0;
        foreach (iss.wrote[w]) nd += int'(iss.wrote[w]);
        $display("%s: %0d program words, %0d data words written", names[b], progs[b].size(), nd);
      end
      for (int c = 0; c < 3; c++) run_one(progs[b], iss, c, names[b], cyc_tab[b][c], rl[b][c]);
      check(cyc_tab[b][0] == iss.steps + iss.taken + 2 * rl[b][0] + 2,
            $sformatf("%s fault-free cycles %0d, expected %0d", names[b], cyc_tab[b][0], iss.steps + iss.taken + 2 * rl[b][0] + 2));
      check(cyc_tab[b][0] >= 1000 && cyc_tab[b][0] <= 2000, $sformatf("%s sized to 1000-2000 cycles (%0d)", names[b], cyc_tab[b][0]));
      check(cyc_tab[b][1] >= cyc_tab[b][0] && cyc_tab[b][2] >= cyc_tab[b][0], $sformatf("%s worst cases not faster", names[b]));
      if (b == 0 || b == 3) check(rl[b][2] > 0, $sformatf("%s worst case 2 needed reloads", names[b]));
    end

    $display("benchmark  fault-free  worst1 (+%%)    worst2 (+%%)    reloads  vs stalling pipeline");
    for (int b = 0; b < 4; b++)
      $display("%-9s  %6d      %6d (%4.1f)  %6d (%4.1f)  %5d    +%4.1f%%",
               names[b], cyc_tab[b][0],
               cyc_tab[b][1], 100.0 * (cyc_tab[b][1] - cyc_tab[b][0]) / cyc_tab[b][0],
               cyc_tab[b][2], 100.0 * (cyc_tab[b][2] - cyc_tab[b][0]) / cyc_tab[b][0],
               rl[b][0], 100.0 * rl[b][0] / (cyc_tab[b][0] - rl[b][0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
