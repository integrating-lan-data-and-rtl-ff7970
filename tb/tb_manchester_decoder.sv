// tb_manchester_decoder - checks clock and bit recovery of the decoder.
//
// A Manchester stream (0 = high-then-low, 1 = low-then-high) is generated
// for three cases: 20-cycle bits with a 15-cycle timer (the data channel),
// 128-cycle bits with a 96-cycle timer (DCP voice) and 320-cycle bits with
// a 240-cycle timer (64 kb/s voice). Each run begins with a block of equal
// bits, on which the timer may lock to the wrong edges; from the second
// bit after the first change of bit value every decoded bit must equal the
// bit of the cell it was sampled in, and the sample must fall in the first
// half of that cell. The recovered clock must be low for exactly the timer
// length, and the number of decoded bits must match one per bit period.
module tb_manchester_decoder;
  logic clk = 1'b0, rst_n = 1'b0, mc = 1'b0;
  logic [8:0] timer_len;
  logic trig, rclk, nrz, bit_strobe;
  int checks = 0, failures = 0;

  manchester_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream generator state, visible to the monitor
  bit cur_bit, prev_bit;
  int pos, prev_pos, period;
  bit armed;
  int strobes;

  // low time of the recovered clock
  int low_len = 0;
  always @(posedge clk) begin
    if (!rst_n) low_len <= 0;
    else if (!rclk) low_len <= low_len + 1;
    else begin
      if (low_len != 0) check(low_len == int'(timer_len), $sformatf("rclk low %0d", low_len));
      low_len <= 0;
    end
  end

  always @(posedge clk) begin
    #1;
    if (bit_strobe) begin
      strobes++;
      if (armed) begin
        check(nrz == prev_bit, $sformatf("decoded %0b, sent %0b", nrz, prev_bit));
        check(prev_pos < period / 2, $sformatf("sample at %0d of %0d", prev_pos, period));
      end
    end
  end

  task automatic run(int per, int nbits);
    bit b, last;
    int changes;
    period = per;
    timer_len = 9'((per * 3) / 4);
    armed = 0; changes = 0; strobes = 0;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    last = 1;
    for (int n = 0; n < nbits; n++) begin
      b = (n < 12) ? 1'b1 : 1'($urandom);
      if (n > 0 && b != last) changes++;
      if (changes == 1 && n > 0 && b != last) armed = 0;
      last = b;
      for (int k = 0; k < per; k++) begin
        @(negedge clk);
        prev_bit = cur_bit; prev_pos = pos;
        cur_bit = b; pos = k;
        mc = (k < per / 2) ? !b : b;
        if (changes >= 1 && n >= 2 && k == per / 2 && !armed && strobes > 0) begin
          // from the bit after the first change onwards
          armed = 1;
        end
      end
    end
    check(changes > 0, "stream had a change");
    check(strobes >= nbits - 2 && strobes <= nbits + 1, $sformatf("strobes %0d for %0d bits", strobes, nbits));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run(20, 600);
    run(128, 150);
    run(320, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
