// tb_ic_switch -- checks the interconnect switch against its routing table.
//
// Every control code 000..111 is applied with random 16-bit values on the
// three inputs; the expected Out, North and South outputs are worked out here
// from the routing table (000 In->Out, 001 In->North, 010 In->South, 011
// North->Out, 100 In->Out plus North->South, 101 South->Out, 110 In->Out plus
// South->North, 111 as 000), with every unused output at zero. The switch is
// combinational, so outputs are checked 1 ns after the inputs change.
// The routing table is the description's; driving unused outputs to zero is
// this design's choice and is checked as such.
module tb_ic_switch;
  import dt_pkg::*;

  typedef logic [15:0] pay_t;
  sw_ctrl_t ctrl;
  pay_t in_d, out_d, n_in, n_out, s_in, s_out;
  int checks = 0, failures = 0;

  ic_switch #(.T(pay_t)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    pay_t e_out, e_n, e_s;
    for (int t = 0; t < 400; t++) begin
      ctrl = sw_ctrl_t'(t % 8);
      in_d = pay_t'($urandom); n_in = pay_t'($urandom); s_in = pay_t'($urandom);
      #1;
      e_out = '0; e_n = '0; e_s = '0;
      case (t % 8)
        1: e_n = in_d;
        2: e_s = in_d;
        3: e_out = n_in;
        4: begin e_out = in_d; e_s = n_in; end
        5: e_out = s_in;
        6: begin e_out = in_d; e_n = s_in; end
        default: e_out = in_d;
      endcase
      check(out_d == e_out && n_out == e_n && s_out == e_s,
            $sformatf("code %03b: out %h n %h s %h, expected %h %h %h", 3'(t % 8), out_d, n_out, s_out, e_out, e_n, e_s));
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
