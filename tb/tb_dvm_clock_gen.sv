// tb_dvm_clock_gen - checks the divider chains of dvm_clock_gen.
//
// For every rate setting the bench measures, from the master clock, the
// period and high time of DATA.CLK and of VOICE.CLK and compares them with
// 20.48 MHz divided by the nominal rate. It checks that every *_rise /
// *_fall strobe is followed, one cycle later, by the matching level change
// and that no level changes without its strobe, and that the 64/128/256 kHz
// edges fall on DATA.CLK falling edges.
module tb_dvm_clock_gen;
  import dvm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  voice_rate_e rate_sel;
  logic data_clk, clk_256, clk_128, clk_64, clk_160, voice_clk;
  logic data_rise, data_fall, voice_rise, voice_fall;
  int checks = 0, failures = 0;

  dvm_clock_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe / level consistency, sampled every cycle
  logic dpre, vpre, drq, dfq, vrq, vfq;
  bit   mon_on = 0;
  always @(posedge clk) begin
    dpre <= data_clk; vpre <= voice_clk;
    drq <= data_rise; dfq <= data_fall; vrq <= voice_rise; vfq <= voice_fall;
  end
  always @(negedge clk) if (mon_on) begin
    if (data_clk != dpre) check((data_clk && drq) || (!data_clk && dfq), "data strobe");
    if (drq) check(data_clk && !dpre, "data_rise not followed by rise");
    if (voice_clk != vpre) check((voice_clk && vrq) || (!voice_clk && vfq), "voice strobe");
    if (vfq) check(!voice_clk && vpre, "voice_fall not followed by fall");
  end

  task automatic measure(input voice_rate_e r, input int unsigned exp_v);
    int t, t_rise0, t_fall, t_rise1;
    rate_sel = r;
    repeat (3) @(posedge clk);
    // voice clock
    t = 0;
    while (!(voice_clk && !vpre)) begin @(negedge clk); end
    t_rise0 = int'($time / 10);
    @(negedge clk);
    while (voice_clk) @(negedge clk);
    t_fall = int'($time / 10);
    while (!voice_clk) @(negedge clk);
    t_rise1 = int'($time / 10);
    check(t_rise1 - t_rise0 == int'(exp_v), $sformatf("voice period %0d exp %0d", t_rise1 - t_rise0, exp_v));
    check(t_fall - t_rise0 == int'(exp_v / 2), $sformatf("voice high %0d", t_fall - t_rise0));
    if (r != VRATE_160) check(dpre && !data_clk, "voice edge not on data falling edge");
  endtask

  initial begin
    int t0, t1, tf;
    rate_sel = VRATE_64;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mon_on = 1;
    // data clock
    @(negedge clk); while (!(data_clk && !dpre)) @(negedge clk);
    t0 = int'($time / 10);
    @(negedge clk); while (data_clk) @(negedge clk);
    tf = int'($time / 10);
    while (!data_clk) @(negedge clk);
    t1 = int'($time / 10);
    check(t1 - t0 == 20, $sformatf("data period %0d", t1 - t0));
    check(tf - t0 == 10, "data high time");
    measure(VRATE_64, 320);
    measure(VRATE_128, 160);
    measure(VRATE_160, 128);
    measure(VRATE_256, 80);
    measure(VRATE_64, 320);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
