// tb_speed_register -- drives random accelerations and checks that the
// Speed Register equals the running sum of all accelerations applied
// before each clock edge (modulo 2^64), that it holds with zero
// acceleration, wraps on overflow and clears on reset.
module tb_speed_register;

  localparam int N = 64;
  int checks = 0, failures = 0;

  logic clk, rst = 1;
  initial clk = 1'b0;
  logic signed [N-1:0] ar = '0;
  logic signed [N-1:0] sr;

  speed_register dut (.clk, .rst, .ar, .sr);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint sum;
    ar = 64'sd12345;
    repeat (2) @(posedge clk);
    #1 check(sr == '0, "reset clears SR");
    rst = 0;
    sum = 0;
    // constant acceleration: speed grows linearly
    ar = -64'sd7;
    for (int i = 1; i <= 20; i++) begin
      @(posedge clk);
      #1 check(longint'(sr) == -7 * i, $sformatf("linear ramp step %0d: %0d", i, sr));
    end
    sum = -140;
    // random accelerations
    for (int i = 0; i < 1000; i++) begin
      logic signed [N-1:0] a;
      a = {$urandom, $urandom};
      if (i % 3 == 0) a = a >>> 20;
      ar = a;
      sum += longint'(a);
      @(posedge clk);
      #1 check(longint'(sr) == sum, $sformatf("cycle %0d: SR %0d, expected %0d", i, sr, sum));
    end
    // zero acceleration holds the speed
    ar = '0;
    repeat (5) @(posedge clk);
    #1 check(longint'(sr) == sum, "zero acceleration holds speed");
    // wrap-around at the positive limit
    rst = 1; @(posedge clk); #1 rst = 0;
    ar = 64'sh4000_0000_0000_0000;
    repeat (2) @(posedge clk);
    #1 check(sr == 64'sh8000_0000_0000_0000, "two's-complement wrap");
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
