// tb_bidir_reg -- checks the direction-controlled interconnect register.
//
// Random values on both sides and a random direction bit each cycle; one
// clock edge later the register must hold the upper switch's value when the
// direction is down (0) and the lower switch's value when it is up (1). Also
// checks that reset clears it. Latency under test: exactly one cycle.
// The 1-bit direction control is the description's; the reset value is this
// design's choice.
module tb_bidir_reg;
  typedef logic [15:0] pay_t;
  logic clk = 0, rst_n, dir;
  pay_t from_up, from_dn, q, exp_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bidir_reg #(.T(pay_t)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 0; dir = 0; from_up = '1; from_dn = '1;
    #12;
    check(q == '0, "reset clears the register");
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      dir = 1'($urandom); from_up = pay_t'($urandom); from_dn = pay_t'($urandom);
      exp_q = dir ? from_dn : from_up;
      @(posedge clk); #1;
      check(q == exp_q, $sformatf("dir %0d: q %h, expected %h", dir, q, exp_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
