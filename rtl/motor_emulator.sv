// motor_emulator -- hardware emulator of a brushed DC motor, its current
// driver and an incremental encoder.
//
// The emulator replaces the real drive chain while a motor controller is
// being developed: the controller writes a torque word and reads back
// quadrature encoder signals, as it would with a real motor. The model is
// a frictionless inertia driven by a current-mode driver, so torque is
// proportional to the command and acceleration is proportional to torque.
// Motion is integrated twice, once per clock, by registers:
//
//   torque --> AR --(+)--> SR --(+)--> PR --> encoder
//                ^___|        ^___|
//
//   AR(n+1) = torque(n) * 2^TORQUE_LSB   (sign extended)
//   SR(n+1) = SR(n) + AR(n)
//   PR(n+1) = PR(n) + SR(n)          (all modulo 2^N)
//
// One LSB of PR is 2*pi/2^N rad, of SR 2*pi*fclk/2^N rad/s and of AR
// 2*pi*fclk^2/2^N rad/s^2. A torque step therefore shows on PR two clocks
// later as a parabola. The encoder phases are two adjacent PR bits, ENC_BITS
// below the top, Gray-coded by an XOR.
//
// Interface: torque is two's complement, TORQUE_BITS wide, and is placed
// with its LSB at bit TORQUE_LSB of the acceleration word (sign extended).
// The defaults (N = 64, full-width torque at bit 0, 256-count encoder) are
// the configuration the emulator was simulated in; an 8-bit torque bus at
// an offset is the typical controller connection. rst is synchronous and
// active high and clears acceleration, speed and position. The speed
// output is brought out for observation, a choice of this design.
module motor_emulator
  import motor_pkg::*;
#(
  parameter int unsigned N           = 64,  // width of AR, SR and PR
  parameter int unsigned TORQUE_BITS = 64,  // width of the torque input bus
  parameter int unsigned TORQUE_LSB  = 0,   // AR bit that receives torque bit 0
  parameter int unsigned ENC_BITS    = 8    // encoder resolution 2^ENC_BITS
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic signed [TORQUE_BITS-1:0] torque,    // torque command
  output logic        [N-1:0]           position,  // shaft angle (PR)
  output logic signed [N-1:0]           speed,     // shaft speed (SR)
  output quad_t                         enc        // quadrature encoder
);

  logic signed [N-1:0] ar;

  accel_register #(
    .N           (N),
    .TORQUE_BITS (TORQUE_BITS),
    .TORQUE_LSB  (TORQUE_LSB)
  ) u_ar (
    .clk    (clk),
    .rst    (rst),
    .torque (torque),
    .ar     (ar)
  );

  speed_register #(.N(N)) u_sr (
    .clk (clk),
    .rst (rst),
    .ar  (ar),
    .sr  (speed)
  );

  position_register #(.N(N)) u_pr (
    .clk (clk),
    .rst (rst),
    .sr  (speed),
    .pr  (position)
  );

  encoder_output #(.N(N), .ENC_BITS(ENC_BITS)) u_enc (
    .pr  (position),
    .enc (enc)
  );

endmodule
