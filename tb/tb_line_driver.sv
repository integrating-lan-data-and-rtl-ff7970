// tb_line_driver - checks the differential drive levels.
//
// PLUS alone must give +DRIVE, MINUS alone -DRIVE, both or neither 0, for
// the default and for an overridden drive level.
module tb_line_driver;
  logic plus, minus;
  logic signed [7:0] chanin, chanin2;
  int checks = 0, failures = 0;

  line_driver dut (.*);
  line_driver #(.SAMPLE_W(8), .DRIVE(50)) dut2 (.plus, .minus, .chanin(chanin2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {plus, minus} = 2'(i);
      #1;
      check(int'(chanin) == 32 * (int'(plus) - int'(minus)), $sformatf("drive 32, case %0d", i));
      check(int'(chanin2) == 50 * (int'(plus) - int'(minus)), $sformatf("drive 50, case %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
