// tb_if_stage -- checks the fetch stage: sequential fetch, redirect and
// reload from the execute stage, and the stream ID.
//
// The program memory is filled with words that encode their own address.
// Without feedback the stage must deliver one instruction per cycle at
// PC, PC+4, ... with an unchanged stream ID. When the feedback is valid, the
// very next output must be the instruction at the feedback target, with the
// stream ID flipped, and fetch continues from target+4 (one-cycle redirect
// latency). Reload requests and branch redirects behave the same here.
// Stream-ID flipping and re-fetch from the feedback address follow the
// description; the one-cycle redirect is this design's timing.
module tb_if_stage;
  import dt_pkg::*;
  logic clk = 0, rst_n, prog_we;
  exif_t fb;
  ifdec_t out;
  logic [9:0] prog_addr;
  word_t prog_data;
  int checks = 0, failures = 0, n_redirect = 0;

  always #5 clk = ~clk;

  if_stage dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t word_at(int a);
    return 32'hA500_0000 ^ (a * 32'h0001_0003);
  endfunction

  initial begin
    word_t exp_pc;
    logic  exp_sid;
    rst_n = 0; prog_we = 0; fb = '0; prog_addr = '0; prog_data = '0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 10'(a); prog_data = word_at(a);
    end
    @(negedge clk) prog_we = 0;
    check(out.valid == 1'b0, "output invalid during reset");
    rst_n = 1;
    exp_pc = 0; exp_sid = 0;
    for (int t = 0; t < 2000; t++) begin
      fb = '0;
      if (($urandom % 5) == 0) begin
        fb.valid  = 1'b1;
        fb.reload = 1'($urandom);
        fb.target = {20'b0, 10'($urandom), 2'b00};
      end
      @(posedge clk); #1;
      if (fb.valid) begin
        exp_pc  = fb.target;
        exp_sid = ~exp_sid;
        n_redirect++;
      end
      check(out.valid && out.pc == exp_pc && out.sid == exp_sid && out.instr == word_at(exp_pc[11:2]),
            $sformatf("cycle %0d: valid %0d pc %h sid %0d instr %h, expected pc %h sid %0d instr %h",
                      t, out.valid, out.pc, out.sid, out.instr, exp_pc, exp_sid, word_at(exp_pc[11:2])));
      exp_pc += 4;
      @(negedge clk);
    end
    check(n_redirect > 0, "redirects happened");
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
