// position_register -- Position Register (PR) of the motor emulator.
//
// Discrete integrator of the speed: on every rising clock edge
// PR <= PR + SR. PR is read as an unsigned angle: its full count 2^N is one
// revolution of the output shaft, so one LSB is 2*pi / 2^N rad and the
// N-bit adder wrapping around is the shaft passing through angle zero.
// A negative speed (two's complement) added modulo 2^N turns the shaft
// backwards. Reset is synchronous, active high, and sets the angle to zero.
module position_register #(
  parameter int unsigned N = 64  // register width
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [N-1:0] sr,  // speed (SR output)
  output logic        [N-1:0] pr   // shaft angle, full count = 1 revolution
);

  always_ff @(posedge clk) begin
    if (rst) pr <= '0;
    else     pr <= pr + N'(sr);
  end

endmodule
