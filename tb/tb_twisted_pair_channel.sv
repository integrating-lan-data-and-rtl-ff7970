// tb_twisted_pair_channel - checks the low-pass channel model.
//
// A random three-level line signal (+32/0/-32, held for 5 to 15 cycles)
// is applied and the output is compared, every cycle, with a real-valued
// model of two cascaded sections y <= y + (x - y)/2 (the second fed by
// the first's new value); the fixed-point output may differ by at
// most 2 units. It also checks the step response at its half-way point
// (two cycles) and that a held level settles to within 1 unit.
module tb_twisted_pair_channel;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] chanin, chout;
  int checks = 0, failures = 0;

  twisted_pair_channel dut (.*);

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

  real y0 = 0.0, y1 = 0.0;
  task automatic step_model();
    real n0, n1;
    n0 = y0 + (real'(chanin) - y0) / 2.0;
    n1 = y1 + (n0 - y1) / 2.0;
    y0 = n0; y1 = n1;
  endtask

  initial begin
    int lvl, hold;
    chanin = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // step
    @(negedge clk); chanin = 32;
    for (int k = 1; k <= 20; k++) begin
      @(posedge clk); step_model(); #1;
      if (k == 2) check(int'(chout) >= 15 && int'(chout) <= 17, $sformatf("half-way point %0d", chout));
      if (k == 1) check(int'(chout) == 8, $sformatf("quarter step after one cycle: %0d", chout));
    end
    check(int'(chout) >= 31, "settled level");
    // random levels
    for (int seg = 0; seg < 400; seg++) begin
      lvl = 32 * (int'($urandom_range(2)) - 1);
      hold = int'($urandom_range(15, 5));
      @(negedge clk); chanin = 8'(lvl);
      for (int k = 0; k < hold; k++) begin
        @(posedge clk); step_model(); #1;
        check((real'(chout) - y1) <= 2.0 && (y1 - real'(chout)) <= 2.0,
              $sformatf("output %0d vs model %f", chout, y1));
        if (k < hold - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
