// tb_motor_emulator -- end-to-end test of the emulator at its default size
// (N = 64, 64-bit torque at bit 0, 256-count encoder).
//
// Sequence: reset; a torque step from 0 to 2^40 (the published step test),
// held until the shaft has turned more than one revolution; a negative
// torque that brakes the shaft, reverses it and turns it backward through
// angle zero; a reset in mid-motion. Every clock the outputs are compared
// with a cycle model of the three registers, and during the step with the
// closed form PR = T*(k-1)*(k-2)/2 after k clocks of torque T. A quadrature
// decoder counts the encoder steps; its count must always equal the top
// eight bits of the position, and the first encoder change after the step
// must come at the clock the closed form predicts.
// Mechanisms counted: reset, forward and backward encoder steps, forward
// and backward wrap of the angle through zero, speed sign reversal.
module tb_motor_emulator;
  import motor_pkg::*;

  localparam int N = 64;
  localparam longint STEP = 64'sd1 <<< 40;

  typedef longint unsigned u64_t;
  int checks = 0, failures = 0;
  int n_reset = 0, n_fwd = 0, n_bwd = 0, n_wrap_fwd = 0, n_wrap_bwd = 0, n_reverse = 0;

  logic clk, rst = 1;
  initial clk = 1'b0;
  logic signed [N-1:0] torque = '0;
  logic        [N-1:0] position;
  logic signed [N-1:0] speed;
  quad_t               enc;

  motor_emulator dut (.clk, .rst, .torque, .position, .speed, .enc);

  always #5 clk = ~clk;

  // cycle model
  longint m_ar, m_sr;
  u64_t   m_pr;
  always @(posedge clk) begin
    if (rst) begin
      m_ar <= 0; m_sr <= 0; m_pr <= 0;
    end else begin
      m_ar <= longint'(torque);
      m_sr <= m_sr + m_ar;
      m_pr <= m_pr + u64_t'(m_sr);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // quadrature decoder state
  logic [1:0] prev_enc;
  int         dec_count;   // decoded encoder counts, modulo 256
  u64_t prev_pr;
  longint     prev_sr;
  int         last_dir;    // sign of the last non-zero speed

  function automatic int qidx(input logic [1:0] ab);
    case (ab)
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  // compare and decode one clock; called after each rising edge
  task automatic observe();
    int d;
    check(position == m_pr, $sformatf("position %h, model %h", position, m_pr));
    check(longint'(speed) == m_sr, $sformatf("speed %0d, model %0d", speed, m_sr));
    if (rst) begin
      dec_count = 0;
    end else begin
      d = (qidx(enc) - qidx(prev_enc) + 4) % 4;
      if (d == 1) begin n_fwd++; dec_count = (dec_count + 1) % 256; end
      if (d == 3) begin n_bwd++; dec_count = (dec_count + 255) % 256; end
      check(d != 2, "encoder skipped a state at low speed");
      check(dec_count == int'(position[63:56]),
            $sformatf("decoded count %0d, angle top byte %0d", dec_count, position[63:56]));
      if (prev_sr >= 0 && longint'(speed) >= 0 && position < prev_pr) n_wrap_fwd++;
      if (prev_sr < 0 && longint'(speed) < 0 && position > prev_pr) n_wrap_bwd++;
      if (longint'(speed) != 0) begin
        if ((last_dir > 0 && longint'(speed) < 0) || (last_dir < 0 && longint'(speed) > 0))
          n_reverse++;
        last_dir = (longint'(speed) > 0) ? 1 : -1;
      end
    end
    prev_enc = enc;
    prev_pr  = position;
    prev_sr  = longint'(speed);
  endtask

  task automatic tick();
    @(posedge clk);
    #1 observe();
  endtask

  initial begin
    int k, first_change, expect_first;
    prev_enc = 2'b00; dec_count = 0; last_dir = 0; prev_pr = 0; prev_sr = 0;
    torque = 64'sd777;
    repeat (3) tick();
    check(position == '0 && speed == '0 && enc == 2'b00, "reset state");
    n_reset++;
    rst = 0;
    torque = '0;
    repeat (20) tick();
    check(position == '0, "no torque, no motion");

    // torque step
    torque = STEP;
    first_change = -1;
    // first k with (k-1)(k-2)/2 * 2^40 >= 2^56
    expect_first = 0;
    for (int j = 1; j < 2000; j++)
      if ((longint'(j) - 1) * (longint'(j) - 2) >= (longint'(1) <<< 17)) begin
        expect_first = j; break;
      end
    for (k = 1; k <= 9000; k++) begin
      tick();
      check(position == u64_t'(STEP) * u64_t'((longint'(k) - 1) * (longint'(k) - 2) / 2),
            $sformatf("step: clock %0d position %h", k, position));
      if (first_change < 0 && enc != 2'b00) begin
        first_change = k;
        check(enc == 2'b10, "first encoder state after 00 is 10 when moving forward");
      end
    end
    check(first_change == expect_first,
          $sformatf("first encoder edge at clock %0d, expected %0d", first_change, expect_first));

    // brake and reverse
    torque = -(STEP <<< 1);
    repeat (16000) tick();

    // reset in motion
    rst = 1;
    tick();
    check(position == '0 && speed == '0, "reset in motion");
    n_reset++;
    rst = 0;
    torque = '0;
    repeat (5) tick();
    check(position == '0, "stays at rest after reset");

    $display("mechanisms: reset=%0d fwd_steps=%0d bwd_steps=%0d wrap_fwd=%0d wrap_bwd=%0d reversals=%0d",
             n_reset, n_fwd, n_bwd, n_wrap_fwd, n_wrap_bwd, n_reverse);
    check(n_reset > 0, "reset exercised");
    check(n_fwd > 0, "forward encoder steps exercised");
    check(n_bwd > 0, "backward encoder steps exercised");
    check(n_wrap_fwd > 0, "forward wrap through zero exercised");
    check(n_wrap_bwd > 0, "backward wrap through zero exercised");
    check(n_reverse > 0, "speed reversal exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
