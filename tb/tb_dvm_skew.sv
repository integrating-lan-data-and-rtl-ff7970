// tb_dvm_skew - voice-to-data clock skew sweep through the external inputs.
//
// The prototype drives both sources from one clock, so skew between them
// cannot be set inside the design. This bench switches S2 to external and
// builds its own manchester streams on a master-cycle counter: a data bit
// every 20 cycles (1024 kb/s) and a voice bit every 320 cycles (64 kb/s),
// with the voice bit boundaries lagged s cycles behind a data bit
// boundary. One cycle is 48.8 ns, 5 % of a data bit, so s = 1..15 is the
// sweep 5 % .. 75 % of the document's Table 4-1; s = 0 is added as a
// reference. For each skew 32 voice bits and 512 data bits are sent after a
// lock-in period, as in the document's simulation.
//
// Errors are counted as mismatches between the sent and the decoded
// sequences, at the best alignment of the two (a lag of up to two bits,
// which covers the decoder's pipeline and lock-in).
//
// Expected (from the document's Table 4-1 discussion: errors appear "when the
// skew approaches the 25% mark where the voice transitions interfere with
// the data at the data sampling point"): a voice transition that falls
// while MCD is 1 swings the line through zero and leaves a short notch in
// R.MCD. The data decoder samples 3/4 of a bit after each centre edge, that
// is 1/4 of a bit (5 cycles) into the next bit, so only voice boundaries
// lagging the data boundaries by about 20 % .. 35 % (s = 4..7) can corrupt
// data. The bench requires zero data errors outside that window, some
// errors inside it, and zero voice errors at every skew (the voice trigger
// only looks at the sign of the line).
module tb_dvm_skew;
  import dvm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  voice_rate_e rate_sel = VRATE_64;
  logic s1_random = 1'b1, s2_internal = 1'b0, ext_mcv = 1'b0, ext_mcd = 1'b0, err_clear = 1'b0;
  logic data_clk, voice_clk, data_rise, voice_rise, tx_data, tx_voice, make_a_bit, make_b_bit;
  logic mcd, mcv, plus, minus;
  logic signed [7:0] rcvsig, rcvabs;
  logic r_mcd, r_mcv, d_trig, v_trig, d_clk, v_clk, data_bits, voice_bits;
  logic d_bit_strobe, v_bit_strobe, d_err, v_err;
  logic [31:0] d_err_count, v_err_count;

  int checks = 0, failures = 0;

  dvm_system dut (.*);

  always #24.414 clk = ~clk;   // 20.48 MHz

  localparam int DBIT = 20, VBIT = 320;
  localparam int LOCK_V = 8;            // voice bits sent before counting
  localparam int N_V = 32, N_D = N_V * VBIT / DBIT;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // errors of the best alignment of rx against tx, lags -2..2, counting
  // tx bits first..first+n-1
  function automatic int best_errors(ref bit tx[$], ref bit rx[$], input int first, input int n);
    int best = n;
    for (int lag = -2; lag <= 2; lag++) begin
      int e = 0;
      for (int i = first; i < first + n; i++)
        if (i + lag < 0 || i + lag >= rx.size() || rx[i + lag] != tx[i]) e++;
      if (e < best) best = e;
    end
    return best;
  endfunction

  task automatic run_skew(input int s, output int derr, output int verr);
    bit tx_d[$], tx_v[$], rx_d[$], rx_v[$];
    bit bd, bv;
    int total;
    // each voice bit starts s cycles after a data bit boundary; random bits
    // on both channels
    total = (LOCK_V + N_V + 2) * VBIT;
    @(negedge clk); rst_n = 1'b0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
    bd = 0; bv = 0;
    for (int t = 0; t < total; t++) begin
      @(negedge clk);
      if (t % DBIT == 0) begin bd = 1'($urandom); tx_d.push_back(bd); end
      if (t >= s && (t - s) % VBIT == 0) begin bv = 1'($urandom); tx_v.push_back(bv); end
      // clock high in the first half of a bit: 0 -> 10, 1 -> 01
      ext_mcd = ((t % DBIT) < DBIT / 2) ^ bd;
      ext_mcv = (t >= s) ? ((((t - s) % VBIT) < VBIT / 2) ^ bv) : 1'b0;
      @(posedge clk); #1;
      if (d_bit_strobe) rx_d.push_back(data_bits);
      if (v_bit_strobe) rx_v.push_back(voice_bits);
    end
    derr = best_errors(tx_d, rx_d, LOCK_V * VBIT / DBIT, N_D);
    verr = best_errors(tx_v, rx_v, LOCK_V, N_V);
  endtask

  initial begin
    int derr [16];
    int verr [16];
    int n_err_skews;
    n_err_skews = 0;
    repeat (2) @(negedge clk);
    $display("skew%%  skew(ns)  voice errors  data errors   (%0d voice, %0d data bits)", N_V, N_D);
    for (int s = 0; s <= 15; s++) begin
      run_skew(s, derr[s], verr[s]);
      $display("%4d  %8.0f  %12d  %11d", s * 5, s * 48.828, verr[s], derr[s]);
      check(verr[s] == 0, $sformatf("voice errors at skew %0d%%", s * 5));
      if (s < 4 || s > 7)
        check(derr[s] == 0, $sformatf("data errors at skew %0d%%", s * 5));
      else if (derr[s] > 0) n_err_skews++;
    end
    $display("mechanisms: skews=16 skews_with_data_errors=%0d", n_err_skews);
    check(n_err_skews > 0, "no skew near the data sample point disturbed the data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
