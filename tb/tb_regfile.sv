// tb_regfile -- checks the 16 x 32 register file against a model array.
//
// Random writes (including to r0) and random reads on both ports every cycle.
// Reads are asynchronous and see a write of the same cycle (write-through);
// r0 always reads zero; after reset every register reads zero.
// 16 registers with r0 = 0 follow the description; write-through is this
// design's choice.
module tb_regfile;
  import dt_pkg::*;
  logic clk = 0, rst_n, we;
  ridx_t waddr, raddr1, raddr2;
  word_t wdata, rdata1, rdata2;
  word_t model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t expect_rd(ridx_t a);
    if (a == 0) return '0;
    if (we && waddr == a) return wdata;
    return model[a];
  endfunction

  initial begin
    rst_n = 0; we = 0; waddr = '0; wdata = '0; raddr1 = '0; raddr2 = '0;
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = ridx_t'($urandom); wdata = $urandom;
      raddr1 = ridx_t'($urandom); raddr2 = (t % 3 == 0) ? waddr : ridx_t'($urandom);
      #1;
      check(rdata1 == expect_rd(raddr1), $sformatf("port1 r%0d = %h, expected %h", raddr1, rdata1, expect_rd(raddr1)));
      check(rdata2 == expect_rd(raddr2), $sformatf("port2 r%0d = %h, expected %h", raddr2, rdata2, expect_rd(raddr2)));
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
