// accel_register -- Acceleration Register (AR) of the motor emulator, with
// the torque input connection in front of it.
//
// The register holds the acceleration that the speed integrator adds each
// clock, and is loaded from the torque input on every rising clock edge,
// so the motor model sees a new torque one clock after it is applied.
// One LSB of AR is the acceleration step 2*pi*fclk^2 / 2^N rad/s^2.
//
// Torque connection. The analog DAC and current driver of a real drive
// make the torque proportional to the commanded value; with a fixed
// inertia the acceleration is proportional to the torque. Here that gain
// is a power of two: the TORQUE_BITS-wide two's-complement torque word is
// placed into AR with its LSB at bit TORQUE_LSB, the bits below are loaded
// with zero and the bits above repeat the torque MSB (sign extension).
// Raising TORQUE_LSB by one doubles the torque one input LSB represents.
// The typical controller connection is an 8-bit torque at bit 5 of a
// 32-bit AR (N=32, TORQUE_BITS=8, TORQUE_LSB=5). The defaults (64-bit
// torque at bit 0 of a 64-bit AR) load the acceleration value directly.
// An unsigned connection (upper bits tied to zero) is a described variant;
// the signed one is built, since the torque is two's complement.
//
// Reset is synchronous and active high and clears the register (no
// torque); the reset style is a choice of this design.
// Requires TORQUE_LSB + TORQUE_BITS <= N.
module accel_register #(
  parameter int unsigned N           = 64,  // register width
  parameter int unsigned TORQUE_BITS = 64,  // torque input width
  parameter int unsigned TORQUE_LSB  = 0    // AR bit that receives torque bit 0
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic signed [TORQUE_BITS-1:0] torque,  // torque command
  output logic signed [N-1:0]           ar       // registered acceleration
);

  initial begin
    assert (TORQUE_LSB + TORQUE_BITS <= N)
      else $error("accel_register: TORQUE_LSB + TORQUE_BITS must not exceed N");
  end

  logic signed [N-1:0] accel_in;

  // sign-extend to N bits (signed operand), then shift zeros in below
  always_comb accel_in = N'(torque) <<< TORQUE_LSB;

  always_ff @(posedge clk) begin
    if (rst) ar <= '0;
    else     ar <= accel_in;
  end

endmodule
