// tb_torque_profile -- one second of emulated time (10^6 clocks at 1 MHz)
// driven by a torque profile of 1000 samples, one every 1000 clocks, made
// of a cosine, single pulses and square waves, at the emulator's default
// size (N = 64).
//
// Profile (sample s, amplitude A = 2^27):
//   s   0..249  A*cos(2*pi*s/250)       one full cosine period
//   s 250..264  +A
//   then zero with pulses -A (360..389), +A (480..509), -A (605..639),
//   and a square wave +A (735..814), -A (815..939), +A (940..999).
// Checks: every clock the position and speed equal a cycle model of the
// three registers; the encoder never skips a state and its decoded count
// always equals the top byte of the position; at the end of every sample
// the position matches, to within 0.5 % of the cosine's peak excursion
// 2A/w^2 (w = 2*pi/250000 per clock), a real-valued continuous double
// integration of the same piecewise-constant torque.
module tb_torque_profile;
  import motor_pkg::*;

  typedef longint unsigned u64_t;
  localparam int     SAMPLES   = 1000;
  localparam int     HOLD      = 1000;       // clocks per torque sample
  localparam longint A         = 64'sd1 <<< 27;
  localparam real    PI        = 3.14159265358979323846;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_bwd = 0;

  logic clk, rst = 1;
  initial clk = 1'b0;
  logic signed [63:0] torque = '0;
  logic        [63:0] position;
  logic signed [63:0] speed;
  quad_t              enc;

  motor_emulator dut (.clk, .rst, .torque, .position, .speed, .enc);

  always #5 clk = ~clk;

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

  function automatic longint sample(input int s);
    if (s < 250)  return longint'($rtoi(real'(A) * $cos(2.0 * PI * real'(s) / 250.0)));
    if (s < 265)  return A;
    if (s >= 360 && s < 390) return -A;
    if (s >= 480 && s < 510) return A;
    if (s >= 605 && s < 640) return -A;
    if (s >= 735 && s < 815) return A;
    if (s >= 815 && s < 940) return -A;
    if (s >= 940) return A;
    return 0;
  endfunction

  function automatic int qidx(input logic [1:0] ab);
    case (ab)
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  initial begin
    logic [1:0] prev_enc;
    int         dec, d, mism;
    real        w, peak, p_ref, v_ref, a_ref, tt;
    longint     err;
    w    = 2.0 * PI / 250000.0;
    peak = 2.0 * real'(A) / (w * w);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    prev_enc = enc;
    dec  = 0;
    mism = 0;
    p_ref = 0.0; v_ref = 0.0;
    tt = real'(HOLD);
    for (int s = 0; s < SAMPLES; s++) begin
      torque = sample(s);
      a_ref  = real'(sample(s));
      p_ref  = p_ref + v_ref * tt + a_ref * tt * tt / 2.0;
      v_ref  = v_ref + a_ref * tt;
      for (int c = 0; c < HOLD; c++) begin
        @(posedge clk);
        #1;
        if (position != m_pr || longint'(speed) != m_sr) mism++;
        d = (qidx(enc) - qidx(prev_enc) + 4) % 4;
        if (d == 1) begin n_fwd++; dec = (dec + 1) % 256; end
        if (d == 3) begin n_bwd++; dec = (dec + 255) % 256; end
        if (d == 2 || dec != int'(position[63:56])) mism++;
        prev_enc = enc;
      end
      checks++;
      if (mism != 0) begin
        failures++;
        $display("FAIL: sample %0d: %0d clocks disagree with the model or the decoder", s, mism);
        mism = 0;
      end
      err = longint'(position - u64_t'(longint'(p_ref)));
      check(real'(err) < 0.005 * peak && real'(err) > -0.005 * peak,
            $sformatf("sample %0d: position %e, reference %e", s, real'(longint'(position)), p_ref));
      if (s == 124 || s == 249)
        $display("t = %0d ms: position %e, reference %e", s + 1, real'(position), p_ref);
    end
    $display("final position %e, encoder steps forward %0d backward %0d", real'(position), n_fwd, n_bwd);
    check(n_fwd > 0 && n_bwd > 0, "shaft moved both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SAMPLES * HOLD + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
