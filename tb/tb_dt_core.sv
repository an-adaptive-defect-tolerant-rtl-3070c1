// tb_dt_core -- runs programs on single defect-tolerant pipelines built with
// different numbers of interconnect bubble stages and compares the final
// register and memory state with the instruction-set reference model.
//
// Five cores run the same program side by side:
//   cfg 0  fault-free core (no bubble stages)
//   cfg 1  EX stage borrowed from the neighbouring row (DEC->EX 1, EX->MEM 1)
//   cfg 2  MEM stage borrowed from the row three away (EX->MEM 3, MEM->WB 3)
//   cfg 3  DEC and MEM borrowed from the row three away
//          (IF->DEC 3, DEC->EX 3, EX->MEM 3)
//   cfg 4  stages taken from four different rows (2,1,2,1, EX->IF 1)
// Programs: random hazard-dense programs and the four micro-benchmarks.
// Cycle checks on the fault-free core: a program takes exactly
// steps + 1 per taken branch + 2 per load-use reload + pipeline fill, i.e. the
// mispredicted instruction in DEC is the only one lost on a taken branch, and
// a reload loses two cycles where a stalling pipeline would lose one. Every mechanism (bypass from ALU and load entries,
// reload, branch flush, stale-stream drop, load fill, store data from the MEM
// buffer) must occur at least once.
// The configurations follow the description's examples of borrowed stages;
// the programs and the cycle formula are derived for this design.
module tb_dt_core;
  import dt_pkg::*;
  import dt_tb_pkg::*;

  localparam int NCFG = 5;
  localparam int B_IFD [NCFG] = '{0, 0, 0, 3, 2};
  localparam int B_DE  [NCFG] = '{0, 1, 0, 3, 1};
  localparam int B_EM  [NCFG] = '{0, 1, 3, 3, 2};
  localparam int B_MW  [NCFG] = '{0, 0, 3, 0, 1};
  localparam int B_EI  [NCFG] = '{0, 0, 0, 0, 1};
  localparam int FILL_CYCLES  = 3;   // reset release to HALT leaving EX, fault-free

  logic clk = 0;
  logic rst_n;
  logic prog_we;
  logic [9:0] prog_addr;
  word_t prog_data;
  logic [9:0] dbg_addr;
  word_t   dbg_data [NCFG];
  logic    halted   [NCFG];
  ex_ev_t  ex_ev    [NCFG];
  mem_ev_t mem_ev   [NCFG];

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_byp_alu, n_byp_ld, n_reload, n_flush, n_drop, n_fill, n_defer, n_stld;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    dt_core #(
      .B_IF_DEC(B_IFD[c]), .B_DEC_EX(B_DE[c]), .B_EX_MEM(B_EM[c]),
      .B_MEM_WB(B_MW[c]),  .B_EX_IF(B_EI[c])
    ) u_core (
      .clk(clk), .rst_n(rst_n),
      .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
      .dbg_addr(dbg_addr), .dbg_data(dbg_data[c]),
      .halted(halted[c]), .ex_ev(ex_ev[c]), .mem_ev(mem_ev[c])
    );
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NCFG; c++) begin
        if (!halted[c]) begin
          n_byp_alu += int'(ex_ev[c].byp_alu);
          n_byp_ld  += int'(ex_ev[c].byp_ld);
          n_reload  += int'(ex_ev[c].reload);
          n_flush   += int'(ex_ev[c].flush_branch);
          n_drop    += int'(ex_ev[c].drop);
          n_fill    += int'(ex_ev[c].ld_fill);
          n_defer   += int'(ex_ev[c].st_defer);
          n_stld    += int'(mem_ev[c].stld_fwd);
        end
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

  // Load a program, run all configurations, compare, return fault-free cycles
  // and reload count.
  task automatic run_prog(prog_t p, string name, bit check_cycles);
    dt_iss iss;
    int start, done_cyc [NCFG];
    int reloads0, fl0 = 0, dr0 = 0, rt0 = 0;
    bit all_done;
    int addrs[$];
    iss = new();
    iss.load(p);
    void'(iss.run(100000));

    rst_n = 0;
    @(negedge clk);
    for (int a = 0; a < 1024; a++) begin
      prog_we   = 1;
      prog_addr = 10'(a);
      prog_data = (a < p.size()) ? p[a] : enc_nop();
      @(negedge clk);
    end
    prog_we = 0;
    @(negedge clk);
    rst_n = 1;
    start = cyc;
    reloads0 = 0;
    foreach (done_cyc[c]) done_cyc[c] = -1;
    do begin
      @(posedge clk);
      #1;
      all_done = 1;
      for (int c = 0; c < NCFG; c++) begin
        if (halted[c] && done_cyc[c] < 0) done_cyc[c] = cyc - start;
        if (!halted[c]) all_done = 0;
      end
      if (!halted[0]) reloads0 += int'(ex_ev[0].reload);
      if (!halted[0]) fl0 += int'(ex_ev[0].flush_branch);
      if (!halted[0]) dr0 += int'(ex_ev[0].drop);
      if (!halted[0]) rt0 += int'(ex_ev[0].retire);
    end while (!all_done && cyc - start < 20000);

    for (int c = 0; c < NCFG; c++) check(done_cyc[c] > 0, $sformatf("%s cfg%0d halted", name, c));
    repeat (16) @(posedge clk);   // let stores ahead of HALT reach memory

    for (int w = 0; w < TB_MEM; w++) if (iss.wrote[w]) addrs.push_back(w);
    check(addrs.size() >= 15, $sformatf("%s wrote its register dump", name));
    foreach (addrs[i]) begin
      dbg_addr = 10'(addrs[i]);
      #1;
      for (int c = 0; c < NCFG; c++)
        check(dbg_data[c] == iss.dmem[addrs[i]],
              $sformatf("%s cfg%0d mem[%0d] = %h, expected %h", name, c, addrs[i], dbg_data[c], iss.dmem[addrs[i]]));
    end

    if (check_cycles) begin
      check(done_cyc[0] == iss.steps + iss.taken + 2 * reloads0 + FILL_CYCLES - 1,
            $sformatf("%s fault-free cycles %0d, expected %0d (steps %0d, taken %0d, reloads %0d)",
                      name, done_cyc[0], iss.steps + iss.taken + 2 * reloads0 + FILL_CYCLES - 1,
                      iss.steps, iss.taken, reloads0));
    end
    check(fl0 == iss.taken, $sformatf("%s branch flushes %0d, taken branches %0d", name, fl0, iss.taken));
    check(rt0 == iss.steps, $sformatf("%s executed %0d, reference %0d", name, rt0, iss.steps));
    check(dr0 == fl0 + reloads0, $sformatf("%s dropped %0d, expected %0d", name, dr0, fl0 + reloads0));
    $display("%-10s steps %5d taken %4d | cycles cfg0..4: %0d %0d %0d %0d %0d",
             name, iss.steps, iss.taken, done_cyc[0], done_cyc[1], done_cyc[2], done_cyc[3], done_cyc[4]);
  endtask

  initial begin
    rst_n = 0; prog_we = 0; prog_addr = '0; prog_data = '0; dbg_addr = '0;
    n_byp_alu = 0; n_byp_ld = 0; n_reload = 0; n_flush = 0;
    n_drop = 0; n_fill = 0; n_defer = 0; n_stld = 0;
    repeat (3) @(negedge clk);

    run_prog(gen_bench_raw(4),    "raw",    1);
    run_prog(gen_bench_branch(4), "branch", 1);
    run_prog(gen_bench_args(3),   "args",   1);
    run_prog(gen_bench_loop(5),   "loop",   1);
    for (int t = 0; t < 12; t++) run_prog(gen_random(60), $sformatf("rand%0d", t), 1);

    check(n_byp_alu > 0, "bypass from ALU entry seen");
    check(n_byp_ld  > 0, "bypass from arrived-load entry seen");
    check(n_reload  > 0, "flush/reload on load dependency seen");
    check(n_flush   > 0, "branch flush seen");
    check(n_drop    > 0, "stale-stream drop seen");
    check(n_fill    > 0, "load value fill seen");
    check(n_defer   > 0, "store data deferred to MEM seen");
    check(n_stld    > 0, "store data from MEM buffer seen");
    $display("events: byp_alu %0d byp_ld %0d reload %0d flush %0d drop %0d fill %0d defer %0d stld %0d",
             n_byp_alu, n_byp_ld, n_reload, n_flush, n_drop, n_fill, n_defer, n_stld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
