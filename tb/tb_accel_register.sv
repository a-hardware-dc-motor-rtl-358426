// tb_accel_register -- checks the Acceleration Register and its torque
// connection. At the default size (64-bit torque at bit 0) AR must hold,
// one clock later, whatever value was applied. With the typical
// controller connection (8-bit torque at bit 5 of a 32-bit AR) all 256
// torque values are applied and AR must equal torque * 32 as an integer:
// bits 4..0 zero, 12..5 the torque, 31..13 its sign. Reset must clear AR.
module tb_accel_register;

  int checks = 0, failures = 0;

  logic clk, rst = 1;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [63:0] tq64 = '0;
  logic signed [63:0] ar64;
  logic signed [7:0]  tq8 = '0;
  logic signed [31:0] ar32;

  accel_register dut (.clk, .rst, .torque(tq64), .ar(ar64));
  accel_register #(.N(32), .TORQUE_BITS(8), .TORQUE_LSB(5)) dut8 (
    .clk, .rst, .torque(tq8), .ar(ar32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic signed [63:0] v;
    longint e;
    tq64 = 64'h0123_4567_89ab_cdef;
    tq8  = 8'h55;
    repeat (2) @(posedge clk);
    #1 check(ar64 == '0 && ar32 == '0, "reset clears AR");
    rst = 0;
    // every 8-bit torque through the offset connection
    for (int t = -128; t <= 127; t++) begin
      tq8 = 8'(t);
      v   = {$urandom, $urandom};
      tq64 = v;
      @(posedge clk);
      #1;
      e = longint'(t) * 32;
      check(longint'(ar32) == e, $sformatf("torque %0d -> AR %0d, expected %0d", t, ar32, e));
      check(ar32[4:0] == 5'b0 && ar32[31:13] == {19{tq8[7]}} && ar32[12:5] == tq8,
            $sformatf("bit fields for torque %0d", t));
      check(ar64 == v, $sformatf("64-bit AR %h, expected %h", ar64, v));
    end
    // mid-run reset
    rst = 1;
    @(posedge clk);
    #1 check(ar64 == '0 && ar32 == '0, "mid-run reset clears AR");
    rst = 0;
    tq8 = -8'sd1;
    @(posedge clk);
    #1 check(longint'(ar32) == -32, "torque -1 gives -32 after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
