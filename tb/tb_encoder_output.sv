// tb_encoder_output -- checks the quadrature outputs against a table of the
// four states, for random angles and for slow forward and backward sweeps,
// at the default pair (N = 64, ENC_BITS = 8: bits 57 and 56) and at
// N = 16, ENC_BITS = 4 (bits 13 and 12). In a sweep exactly one phase may
// change per encoder step, and counting the steps must give 2^ENC_BITS per
// revolution.
module tb_encoder_output;
  import motor_pkg::*;

  int checks = 0, failures = 0;

  logic [63:0] pr64;
  quad_t       enc64;
  logic [15:0] pr16;
  quad_t       enc16;

  encoder_output dut (.pr(pr64), .enc(enc64));
  encoder_output #(.N(16), .ENC_BITS(4)) dut2 (.pr(pr16), .enc(enc16));

  // {a,b} for quarter-cycle index 0..3, forward order 00,10,11,01
  function automatic logic [1:0] expected_ab(input int unsigned q);
    case (q % 4)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [1:0] prev;
    int steps;
    for (int i = 0; i < 500; i++) begin
      pr64 = {$urandom, $urandom};
      pr16 = 16'($urandom);
      #1;
      check(enc64 == expected_ab(int'(pr64[63:56])),
            $sformatf("N=64 angle %h -> %b", pr64, enc64));
      check(enc16 == expected_ab(int'(pr16[15:12])),
            $sformatf("N=16 angle %h -> %b", pr16, enc16));
    end
    // forward sweep over one revolution in steps of a quarter encoder step
    pr64 = '0;
    #1 prev = enc64;
    steps = 0;
    for (int i = 0; i < 1024; i++) begin
      pr64 += 64'h0040_0000_0000_0000;
      #1;
      if (enc64 != prev) begin
        steps++;
        check($countones(enc64 ^ prev) == 1, "one phase changes per step");
        // forward: new state follows old one in the 00,10,11,01 order
        check((prev == 2'b00 && enc64 == 2'b10) || (prev == 2'b10 && enc64 == 2'b11) ||
              (prev == 2'b11 && enc64 == 2'b01) || (prev == 2'b01 && enc64 == 2'b00),
              "forward order");
      end
      prev = enc64;
    end
    check(steps == 256, $sformatf("forward steps per revolution %0d, expected 256", steps));
    // backward sweep
    steps = 0;
    for (int i = 0; i < 1024; i++) begin
      pr64 -= 64'h0040_0000_0000_0000;
      #1;
      if (enc64 != prev) begin
        steps++;
        check((prev == 2'b10 && enc64 == 2'b00) || (prev == 2'b11 && enc64 == 2'b10) ||
              (prev == 2'b01 && enc64 == 2'b11) || (prev == 2'b00 && enc64 == 2'b01),
              "backward order");
      end
      prev = enc64;
    end
    check(steps == 256, $sformatf("backward steps per revolution %0d, expected 256", steps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
