// speed_register -- Speed Register (SR) of the motor emulator.
//
// Discrete integrator of the acceleration (forward Euler with step h equal
// to one clock period): on every rising clock edge SR <= SR + AR. With the
// step folded into the units, one LSB of SR is 2*pi*fclk / 2^N rad/s.
//
// SR is two's complement. The N-bit adder wraps on overflow, as an adder
// with no saturation logic does; keeping the speed inside
// [-2^(N-1), 2^(N-1)-1] is left to the torque range and run time chosen by
// the user. Reset is synchronous, active high, and clears the speed
// (initial speed zero).
module speed_register #(
  parameter int unsigned N = 64  // register width
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [N-1:0] ar,  // acceleration (AR output)
  output logic signed [N-1:0] sr   // current speed
);

  always_ff @(posedge clk) begin
    if (rst) sr <= '0;
    else     sr <= sr + ar;
  end

endmodule
