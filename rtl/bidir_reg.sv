// bidir_reg -- pipeline register on a vertical hop of the interconnect.
//
// Every hop between the switches of two neighbouring cores is one register
// level, so data that leaves its core's plane pays one extra pipeline stage
// per hop (a "bubble stage"). The register carries data in either direction;
// a 1-bit control picks which side it samples:
//   dir = 0 : downward, samples the upper switch's South output
//   dir = 1 : upward,   samples the lower switch's North output
// Its output feeds both the upper switch's South input and the lower switch's
// North input; only the switch configured to listen uses it.
// Timing: one clock of latency. Reset clears the register, which for every
// payload type means "no valid data".
// The one-bit direction control follows the design description; the one-way
// wire pair replacing the tri-stated wire is this design's choice.
module bidir_reg #(
  parameter type T = logic [7:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dir,     // 0: down, 1: up
  input  T     from_up, // upper switch, South output
  input  T     from_dn, // lower switch, North output
  output T     q        // to upper switch South input and lower switch North input
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= dir ? from_dn : from_up;
  end
endmodule
