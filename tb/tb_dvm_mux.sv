// tb_dvm_mux - checks the multiplexer code table.
//
// For the four MCV/MCD combinations PLUS, MINUS and their difference must
// be 0/0/0, 0/1/-1, 0/0/0, 1/0/+1, and the difference must equal the data
// stream (0/1) times the voice stream read as -1/+1.
module tb_dvm_mux;
  logic mcv, mcd, plus, minus;
  int checks = 0, failures = 0;

  dvm_mux dut (.*);

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
    int exp_p [4] = '{0, 0, 0, 1};
    int exp_m [4] = '{0, 1, 0, 0};
    int diff, prod;
    for (int i = 0; i < 4; i++) begin
      {mcv, mcd} = 2'(i);
      #1;
      check(int'(plus) == exp_p[i], $sformatf("PLUS for MCV,MCD=%0d", i));
      check(int'(minus) == exp_m[i], $sformatf("MINUS for MCV,MCD=%0d", i));
      diff = int'(plus) - int'(minus);
      prod = int'(mcd) * (mcv ? 1 : -1);
      check(diff == prod, $sformatf("product for MCV,MCD=%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
