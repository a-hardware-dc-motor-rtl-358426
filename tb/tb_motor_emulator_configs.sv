// tb_motor_emulator_configs -- the emulator in two smaller configurations:
//   * N = 32 with an 8-bit torque bus placed at bit 5 of the acceleration
//     register (the typical controller connection), 256-count encoder;
//   * N = 16 with a 16-bit torque bus at bit 0 and a 16-count encoder
//     (ENC_BITS = 4), the smallest synthesized size.
// Random torques, held for random times, are applied to both. Every clock
// the position and speed are compared with a cycle model in which the
// torque is scaled by 2^TORQUE_LSB, and the encoder is decoded and its
// count compared with the top ENC_BITS bits of the position.
module tb_motor_emulator_configs;
  import motor_pkg::*;

  int checks = 0, failures = 0;
  int n_fwd32 = 0, n_bwd32 = 0, n_fwd16 = 0, n_bwd16 = 0;

  logic clk, rst = 1;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0]  tq32 = '0;
  logic        [31:0] pos32;
  logic signed [31:0] spd32;
  quad_t              enc32;
  logic signed [15:0] tq16 = '0;
  logic        [15:0] pos16;
  logic signed [15:0] spd16;
  quad_t              enc16;

  motor_emulator #(.N(32), .TORQUE_BITS(8), .TORQUE_LSB(5), .ENC_BITS(8)) dut32 (
    .clk, .rst, .torque(tq32), .position(pos32), .speed(spd32), .enc(enc32));
  motor_emulator #(.N(16), .TORQUE_BITS(16), .TORQUE_LSB(0), .ENC_BITS(4)) dut16 (
    .clk, .rst, .torque(tq16), .position(pos16), .speed(spd16), .enc(enc16));

  // cycle models, kept in 64-bit integers and reduced modulo 2^N on compare
  longint a32, s32, p32, a16, s16, p16;
  always @(posedge clk) begin
    if (rst) begin
      a32 <= 0; s32 <= 0; p32 <= 0; a16 <= 0; s16 <= 0; p16 <= 0;
    end else begin
      a32 <= longint'(tq32) * 32;
      s32 <= s32 + a32;
      p32 <= p32 + s32;
      a16 <= longint'(tq16);
      s16 <= s16 + a16;
      p16 <= p16 + s16;
    end
  end

  function automatic int qidx(input logic [1:0] ab);
    case (ab)
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic [1:0] pe32, pe16;
    int dec32, dec16, d;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pe32 = enc32; pe16 = enc16; dec32 = 0; dec16 = 0;
    for (int seg = 0; seg < 200; seg++) begin
      // small torques keep the speed below one encoder step per clock
      tq32 = 8'($urandom_range(0, 255));
      tq16 = 16'(int'($urandom_range(0, 6)) - 3);
      repeat ($urandom_range(20, 120)) begin
        @(posedge clk);
        #1;
        check(pos32 == 32'(p32) && spd32 == 32'(s32), "N=32 position/speed vs model");
        check(pos16 == 16'(p16) && spd16 == 16'(s16), "N=16 position/speed vs model");
        d = (qidx(enc32) - qidx(pe32) + 4) % 4;
        if (d == 1) begin n_fwd32++; dec32 = (dec32 + 1) % 256; end
        if (d == 3) begin n_bwd32++; dec32 = (dec32 + 255) % 256; end
        if (d != 2) check(dec32 == int'(pos32[31:24]), "N=32 decoded count vs position");
        else dec32 = int'(pos32[31:24]);  // skipped state at high speed: resynchronise
        d = (qidx(enc16) - qidx(pe16) + 4) % 4;
        if (d == 1) begin n_fwd16++; dec16 = (dec16 + 1) % 16; end
        if (d == 3) begin n_bwd16++; dec16 = (dec16 + 15) % 16; end
        if (d != 2) check(dec16 == int'(pos16[15:12]), "N=16 decoded count vs position");
        else dec16 = int'(pos16[15:12]);
        pe32 = enc32; pe16 = enc16;
      end
    end
    $display("encoder steps: N=32 fwd %0d bwd %0d, N=16 fwd %0d bwd %0d",
             n_fwd32, n_bwd32, n_fwd16, n_bwd16);
    check(n_fwd32 > 0 && n_bwd32 > 0 && n_fwd16 > 0 && n_bwd16 > 0, "both directions in both sizes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
