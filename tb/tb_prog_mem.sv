// tb_prog_mem -- checks the program memory at its full size of 1024 words.
//
// Writes a distinct random word to every address through the write port,
// then reads all of them back in a random order; reads are asynchronous, so
// the data is checked in the same cycle the address is applied.
// The size of 1024 words and the host write port are this design's choices.
module tb_prog_mem;
  import dt_pkg::*;
  logic clk = 0, we;
  logic [9:0] waddr, raddr;
  word_t wdata, rdata;
  word_t model [1024];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prog_mem dut (.*);

  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 3000; t++) begin
      raddr = 10'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        $display("FAIL: imem[%0d] = %h, expected %h", raddr, rdata, model[raddr]);
      end
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
