// tb_diff_amp - checks gain and clipping of the receive amplifier.
//
// Every 8-bit input must come out doubled, clipped to +/-127.
module tb_diff_amp;
  logic signed [7:0] vin, rcvsig;
  int checks = 0, failures = 0;

  diff_amp dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = -128; v < 128; v++) begin
      vin = 8'(v);
      #1;
      e = 2 * v;
      if (e > 127) e = 127;
      if (e < -127) e = -127;
      check(int'(rcvsig) == e, $sformatf("in %0d out %0d exp %0d", v, rcvsig, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
