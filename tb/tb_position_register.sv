// tb_position_register -- drives random speeds (both signs) and checks the
// Position Register against the running sum modulo 2^64, including the
// wrap through angle zero in both directions and reset.
module tb_position_register;

  localparam int N = 64;
  typedef longint unsigned u64_t;
  int checks = 0, failures = 0;

  logic clk, rst = 1;
  initial clk = 1'b0;
  logic signed [N-1:0] sr = '0;
  logic        [N-1:0] pr;

  position_register dut (.clk, .rst, .sr, .pr);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint unsigned sum;
    sr = 64'sd99;
    repeat (2) @(posedge clk);
    #1 check(pr == '0, "reset clears PR");
    rst = 0;
    sum = 0;
    for (int i = 0; i < 1000; i++) begin
      logic signed [N-1:0] s;
      s = {$urandom, $urandom};
      if (i % 4 == 1) s = s >>> 30;
      sr = s;
      sum += u64_t'(s);
      @(posedge clk);
      #1 check(pr == sum, $sformatf("cycle %0d: PR %h, expected %h", i, pr, sum));
    end
    // backward through zero: from 3 with speed -5 -> 2^64 - 2
    rst = 1; @(posedge clk); #1 rst = 0;
    sr = 64'sd3; @(posedge clk); #1;
    sr = -64'sd5; @(posedge clk); #1;
    check(pr == 64'hFFFF_FFFF_FFFF_FFFE, "backward wrap through zero");
    // forward through zero: one full revolution returns to the same angle
    sr = 64'sh4000_0000_0000_0000;
    repeat (4) @(posedge clk);
    #1 check(pr == 64'hFFFF_FFFF_FFFF_FFFE, "full revolution is a full count");
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
