// motor_pkg -- types shared by the DC motor emulator.
//
// quad_t is the two-phase incremental encoder output. Channel a is the
// phase that changes first when the shaft turns forward (positive speed),
// b follows a quarter period later. Packed as {a, b}, so the bus reads
// 00 -> 10 -> 11 -> 01 -> 00 while turning forward, which is the order of
// the bus values in the published torque-step waveform.
package motor_pkg;

  typedef struct packed {
    logic a;  // leading phase when moving forward
    logic b;  // lagging phase when moving forward
  } quad_t;

endpackage
