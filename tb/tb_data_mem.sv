// tb_data_mem -- checks the data memory at its full size of 1024 words.
//
// Random stores and loads against a model array: a store is written at the
// clock edge, a load reads asynchronously (the old value in the cycle of a
// store to the same word), and the host read port is checked at a second,
// independent random address every cycle.
// The size, read timing and host port are this design's choices.
module tb_data_mem;
  import dt_pkg::*;
  logic clk = 0, we;
  logic [9:0] addr, dbg_addr;
  word_t wdata, rdata, dbg_rdata;
  word_t model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; addr = '0; dbg_addr = '0; wdata = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      we = 1; addr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 10'($urandom % 64); wdata = $urandom; dbg_addr = 10'($urandom % 64);
      #1;
      check(rdata == model[addr], $sformatf("load [%0d] = %h, expected %h", addr, rdata, model[addr]));
      check(dbg_rdata == model[dbg_addr], $sformatf("host [%0d] = %h, expected %h", dbg_addr, dbg_rdata, model[dbg_addr]));
      @(posedge clk);
      if (we) model[addr] = wdata;
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
