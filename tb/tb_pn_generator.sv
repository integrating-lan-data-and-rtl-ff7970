// tb_pn_generator - checks the PN generator and its zero-run guard.
//
// After reset (all stages zero) the guard must fire after 15 shifts and
// the stream must then obey the recurrence of the feedback taps,
// out[n+14] = out[n+12] ^ out[n+2] ^ out[n+1] ^ out[n], repeat with period
// 16383, hold 8192 ones per period, never show more than 13 zeros in a row
// and never fire the guard again. The delayed outputs must equal the
// output one and two shifts earlier.
module tb_pn_generator;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0;
  logic pn_out, pn_dly1, pn_dly2, make_bit;
  int checks = 0, failures = 0;

  localparam int N = 16383 * 2 + 100;
  bit s [N];

  pn_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_once();
    @(negedge clk); shift_en = 1'b1;
    @(negedge clk); shift_en = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    int guard_at, ones, run, maxrun, guards;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    guard_at = -1;
    for (int k = 0; k < 20 && guard_at < 0; k++) begin
      if (make_bit) guard_at = k;
      else check(pn_out == 1'b0, "nonzero output before guard");
      shift_once();
    end
    check(guard_at == 15, $sformatf("guard fired after %0d shifts", guard_at));
    guards = 0;
    for (int n = 0; n < N; n++) begin
      s[n] = pn_out;
      if (n > 0) guards += make_bit;
      if (n >= 2) check(pn_dly2 == s[n-2] && pn_dly1 == s[n-1], "delayed taps");
      shift_once();
    end
    check(guards == 0, "guard fired during normal run");
    for (int n = 0; n + 14 < N; n++)
      check(s[n+14] == (s[n+12] ^ s[n+2] ^ s[n+1] ^ s[n]), $sformatf("recurrence at %0d", n));
    for (int n = 0; n < 16383 + 100; n++)
      check(s[n] == s[n + 16383], "period 16383");
    ones = 0; run = 0; maxrun = 0;
    for (int n = 0; n < 16383; n++) begin
      ones += s[n];
      run = s[n] ? 0 : run + 1;
      if (run > maxrun) maxrun = run;
    end
    check(ones == 8192, $sformatf("ones per period %0d", ones));
    check(maxrun == 13, $sformatf("longest zero run %0d", maxrun));
    // period is not shorter: the first 50 bits do not recur earlier
    for (int p = 1; p < 16383; p++) begin
      bit same = 1;
      for (int n = 0; n < 50 && same; n++) if (s[n] != s[n+p]) same = 0;
      if (same) check(0, $sformatf("shorter period %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
