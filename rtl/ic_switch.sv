// ic_switch -- one node of the reconfigurable interconnect.
//
// Each link of each core passes through one switch. The switch has the local
// path (In from the producing stage's pipeline register, Out to the consuming
// stage) and two vertical ports, North and South, towards the switches of the
// cores above and below. A 3-bit control selects one of the routings of the
// switch table of the design description:
//   000  In -> Out                    (North/South unused)
//   001  In -> North
//   010  In -> South
//   011  North -> Out
//   100  In -> Out and North -> South (pass-through while the core is in use)
//   101  South -> Out
//   110  In -> Out and South -> North
//   111  as 000
// The switch is purely combinational; the register that follows each vertical
// hop lives in bidir_reg.
//
// Design choice: the description builds the North/South in/out wires with
// tri-state buffers. Here each vertical port is a pair of one-way signals
// (n_in/n_out, s_in/s_out) and an unused output is driven to all zeros, which
// for every payload type means "no valid data". The bidirectional register
// between two switches picks the direction, so the wire pair behaves as the
// tri-stated wire would.
module ic_switch #(
  parameter type T = logic [7:0]
) (
  input  dt_pkg::sw_ctrl_t ctrl,
  input  T                 in_d,    // from this core's producing stage
  output T                 out_d,   // to this core's consuming stage
  input  T                 n_in,    // from the register towards the core above
  output T                 n_out,   // to the register towards the core above
  input  T                 s_in,    // from the register towards the core below
  output T                 s_out    // to the register towards the core below
);
  import dt_pkg::*;

  always_comb begin
    out_d = '0;
    n_out = '0;
    s_out = '0;
    unique case (ctrl)
      SW_IN_N:     n_out = in_d;
      SW_IN_S:     s_out = in_d;
      SW_N_OUT:    out_d = n_in;
      SW_PASS_N2S: begin out_d = in_d; s_out = n_in; end
      SW_S_OUT:    out_d = s_in;
      SW_PASS_S2N: begin out_d = in_d; n_out = s_in; end
      default:     out_d = in_d;   // 000 and 111
    endcase
  end

endmodule
