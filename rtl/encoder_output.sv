// encoder_output -- incremental (quadrature) encoder emulation.
//
// Two adjacent bits of the Position Register are taken: the lower one is
// ENC_BITS places below the register's top, i.e. bit N-ENC_BITS, and the
// upper one is bit N-ENC_BITS+1. As the angle increases these two bits
// count 0,1,2,3 four times per 2^(N-ENC_BITS+2) position counts, giving
// 2^ENC_BITS encoder states (quadrature counts) per revolution. An XOR
// turns the binary count into Gray code so that exactly one phase changes
// per step:
//   b = upper bit
//   a = upper bit XOR lower bit
// Forward motion gives {a,b} = 00, 10, 11, 01, ...; backward motion the
// reverse order.
//
// Combinational; the outputs follow PR in the same clock. If PR moves by
// more than 2^(N-ENC_BITS) counts in one clock the encoder skips states,
// exactly as a real encoder read too slowly would appear to.
// Requires 2 <= ENC_BITS <= N.
module encoder_output
  import motor_pkg::*;
#(
  parameter int unsigned N        = 64,  // Position Register width
  parameter int unsigned ENC_BITS = 8    // log2 of encoder counts per revolution
) (
  input  logic [N-1:0] pr,   // shaft angle
  output quad_t        enc   // quadrature outputs
);

  localparam int unsigned LO = N - ENC_BITS;  // lower bit of the pair

  initial begin
    assert (ENC_BITS >= 2 && ENC_BITS <= N)
      else $error("encoder_output: ENC_BITS must be in 2..N");
  end

  always_comb begin
    enc.b = pr[LO+1];
    enc.a = pr[LO+1] ^ pr[LO];
  end

endmodule
