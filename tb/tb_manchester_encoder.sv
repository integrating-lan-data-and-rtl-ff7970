// tb_manchester_encoder - checks the Manchester encoding table.
//
// For each clock/bit pair the output must be their exclusive-or, and over
// a sequence of cells a 0 must come out as high-then-low and a 1 as
// low-then-high, with a transition in the middle of every cell.
module tb_manchester_encoder;
  logic bit_clk, nrz, mc;
  int checks = 0, failures = 0;

  manchester_encoder dut (.*);

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
    bit first, second;
    for (int i = 0; i < 4; i++) begin
      {bit_clk, nrz} = 2'(i);
      #1;
      check(mc == (i == 1 || i == 2), $sformatf("table entry %0d", i));
    end
    for (int c = 0; c < 64; c++) begin
      nrz = 1'($urandom);
      bit_clk = 1'b1; #1; first = mc;
      bit_clk = 1'b0; #1; second = mc;
      check(first != second, "no centre transition");
      check(second == nrz && first == !nrz, "cell pattern");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
