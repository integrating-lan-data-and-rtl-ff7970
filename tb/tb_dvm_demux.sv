// tb_dvm_demux - checks the demultiplexer on the ideal three-level signal.
//
// Random Manchester-like voice and data levels are combined into
// RCVSIG = 64 * data * (voice ? +1 : -1). In the same cycle R.MCD must equal
// the data level and R.MCV the voice level seen the last time data was 1;
// RCVABS must be the absolute value, with -128 mapped to 127.
module tb_dvm_demux;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] rcvsig, rcvabs;
  logic r_mcv, r_mcd;
  int checks = 0, failures = 0;

  dvm_demux dut (.*);

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

  initial begin
    bit v, d, vseen;
    int a;
    rcvsig = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    vseen = 0;
    for (int k = 0; k < 4000; k++) begin
      if (k % 37 == 0) v = 1'($urandom);
      if (k % 5 == 0) d = 1'($urandom);
      @(negedge clk);
      rcvsig = d ? (v ? 8'sd64 : -8'sd64) : 8'sd0;
      #1;
      a = (int'(rcvsig) < 0) ? -int'(rcvsig) : int'(rcvsig);
      check(int'(rcvabs) == a, "absolute value");
      if (d) vseen = v;
      check(r_mcd == d, "R.MCD");
      check(r_mcv == vseen, "R.MCV");
    end
    @(negedge clk); rcvsig = -8'sd128; #1;
    check(int'(rcvabs) == 127, "abs of -128");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
