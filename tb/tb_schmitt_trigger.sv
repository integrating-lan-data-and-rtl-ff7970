// tb_schmitt_trigger - checks the hysteresis of the Schmitt trigger.
//
// Directed part: a value between the levels must not change the output,
// only reaching the upper level sets it and only reaching the lower level
// clears it, in the same cycle. Random part: a random walk is compared with
// the rule "high at +32 or above, low at -32 or below, else unchanged".
module tb_schmitt_trigger;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] sig_in;
  logic sig_out;
  int checks = 0, failures = 0;

  schmitt_trigger dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int v, bit exp);
    @(negedge clk); sig_in = 8'(v);
    #1;
    check(sig_out == exp, $sformatf("in %0d: out %0b exp %0b", v, sig_out, exp));
  endtask

  initial begin
    bit model;
    int v;
    sig_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    apply(0, 0);  apply(31, 0); apply(32, 1); apply(0, 1); apply(-31, 1);
    apply(31, 1); apply(-32, 0); apply(20, 0); apply(-20, 0); apply(100, 1);
    model = 1; v = 0;
    for (int k = 0; k < 5000; k++) begin
      v += int'($urandom_range(20)) - 10;
      if (v > 100) v = 100;
      if (v < -100) v = -100;
      if (v >= 32) model = 1;
      else if (v <= -32) model = 0;
      apply(v, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
