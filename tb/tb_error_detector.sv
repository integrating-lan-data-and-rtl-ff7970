// tb_error_detector - checks error flag and counter.
//
// Random transmitted and received bits are applied with a strobe every
// 20 cycles; err must show the mismatch at each strobe and hold it until
// the next, and the count must equal the number of mismatching strobes.
// A clear must reset the count.
module tb_error_detector;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, tx_clk_fall = 1'b0, tx_bit = 1'b0, rx_bit = 1'b0;
  logic err;
  logic [31:0] err_count;
  int checks = 0, failures = 0;

  error_detector dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt;
    bit exp_err;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_cnt = 0; exp_err = 0;
    for (int b = 0; b < 1000; b++) begin
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        tx_clk_fall = (c == 10);
        if (c == 2) begin tx_bit = 1'($urandom); rx_bit = ($urandom_range(3) == 0) ? !tx_bit : tx_bit; end
        if (c == 15) rx_bit = !rx_bit;   // changes away from the strobe must not count
        if (tx_clk_fall) begin
          exp_err = tx_bit ^ rx_bit;
          exp_cnt += exp_err;
        end
        @(posedge clk); #1;
        check(err == exp_err, "err flag");
        check(err_count == 32'(exp_cnt), $sformatf("count %0d exp %0d", err_count, exp_cnt));
      end
    end
    check(exp_cnt > 100, "enough errors injected");
    @(negedge clk); tx_clk_fall = 0; clear = 1;
    @(posedge clk); #1; check(err_count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
