// tb_dvm_bandwidth - channel bandwidth sweep of the whole system.
//
// Four copies of dvm_system run side by side from one clock and one reset,
// with PN sources, 64 kb/s voice and 1024 kb/s data. Each has a different
// low-pass channel, set with CH_ORDER sections of coefficient 2^-CH_SHIFT:
//
//   copy  CH_ORDER  CH_SHIFT  -3 dB bandwidth
//    0       1         1        2.36 MHz
//    1       2         1        1.50 MHz   (the design's default)
//    2       4         1        1.01 MHz
//    3       3         2        0.48 MHz
//
// The bandwidths follow from |H(f)| = |a / (1 - (1-a) e^(-j2 pi f/fs))|^N
// with a = 2^-CH_SHIFT and fs = 20.48 MHz. They are the nearest this
// channel structure comes to the 3.0, 1.5, 1.0 and 0.5 MHz cases of the
// document's Butterworth simulations.
//
// The bench records every transmitted bit (TX.DATA, TX.VOICE at mid-bit)
// and every decoded bit, and counts mismatches at the best alignment
// (lag -3..3 bits). That way a slow channel is judged by what it delivers,
// not by the design's own error detectors. Those detectors compare at
// mid-bit and need the whole path to stay under a quarter bit of delay, so
// their counts are printed too, to show where that budget runs out.
//
// Expected (the document: the eye diagrams "show the system should work
// with channel bandwidths down to 1.0 to 1.5 MHz", and the 0.5 MHz channel
// shows "a completely closed eye"): copies 0 and 1 decode data and voice
// without error, and copy 3 does not decode the data. Copy 2 is reported
// only.
module tb_dvm_bandwidth;
  import dvm_pkg::*;

  localparam int N = 4;
  localparam int unsigned ORDERS [N] = '{1, 2, 4, 3};
  localparam int unsigned SHIFTS [N] = '{1, 1, 1, 2};
  localparam real         BW_MHZ [N] = '{2.36, 1.50, 1.01, 0.48};

  localparam int LOCK_V = 20;           // voice bits before counting
  localparam int N_V    = 32;           // voice bits counted
  localparam int N_D    = N_V * 16;     // data bits counted

  logic clk = 1'b0, rst_n = 1'b0;

  int checks = 0, failures = 0;

  always #24.414 clk = ~clk;   // 20.48 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-copy outputs used by the bench
  logic        data_rise [N], voice_rise [N];
  logic        tx_data [N], tx_voice [N], data_bits [N], voice_bits [N];
  logic        d_bit_strobe [N], v_bit_strobe [N];
  logic [31:0] d_err_count [N], v_err_count [N];
  logic        err_clear = 1'b0;

  for (genvar g = 0; g < N; g++) begin : g_sys
    logic data_clk, voice_clk, make_a_bit, make_b_bit, mcd, mcv, plus, minus;
    logic signed [7:0] rcvsig, rcvabs;
    logic r_mcd, r_mcv, d_trig, v_trig, d_clk, v_clk, d_err, v_err;
    dvm_system #(.SAMPLE_W(8), .CH_ORDER(ORDERS[g]), .CH_SHIFT(SHIFTS[g])) dut (
      .clk, .rst_n, .rate_sel(VRATE_64), .s1_random(1'b1), .s2_internal(1'b1),
      .ext_mcv(1'b0), .ext_mcd(1'b0), .err_clear,
      .data_clk, .voice_clk, .data_rise(data_rise[g]), .voice_rise(voice_rise[g]),
      .tx_data(tx_data[g]), .tx_voice(tx_voice[g]), .make_a_bit, .make_b_bit,
      .mcd, .mcv, .plus, .minus, .rcvsig, .rcvabs, .r_mcd, .r_mcv,
      .d_trig, .v_trig, .d_clk, .v_clk,
      .data_bits(data_bits[g]), .voice_bits(voice_bits[g]),
      .d_bit_strobe(d_bit_strobe[g]), .v_bit_strobe(v_bit_strobe[g]),
      .d_err, .v_err, .d_err_count(d_err_count[g]), .v_err_count(v_err_count[g]));
  end

  // sent and received bit sequences of each copy
  bit tx_d [N][$];
  bit tx_v [N][$];
  bit rx_d [N][$];
  bit rx_v [N][$];
  bit record_on = 0;

  // a bit is taken from TX.* in the cycle its clock rises (the strobe is
  // high the cycle before, so the bit of the previous period is still
  // there; the first recorded bit may be partial and is never counted)
  always @(posedge clk) begin
    #1;
    if (record_on)
      for (int i = 0; i < N; i++) begin
        if (data_rise[i])    tx_d[i].push_back(tx_data[i]);
        if (voice_rise[i])   tx_v[i].push_back(tx_voice[i]);
        if (d_bit_strobe[i]) rx_d[i].push_back(data_bits[i]);
        if (v_bit_strobe[i]) rx_v[i].push_back(voice_bits[i]);
      end
  end

  function automatic int best_errors(ref bit tx[$], ref bit rx[$], input int first, input int n);
    int best = n;
    for (int lag = -3; lag <= 3; lag++) begin
      int e = 0;
      for (int i = first; i < first + n; i++)
        if (i + lag < 0 || i + lag >= rx.size() || i >= tx.size() || rx[i + lag] != tx[i]) e++;
      if (e < best) best = e;
    end
    return best;
  endfunction

  initial begin
    int derr [N];
    int verr [N];
    int v_cnt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    record_on = 1;
    // wait LOCK_V + N_V + 2 voice bits, counted on copy 0's voice clock
    v_cnt = 0;
    while (v_cnt < LOCK_V + N_V + 2) begin
      @(posedge clk);
      if (voice_rise[0]) v_cnt++;
      if (v_cnt == LOCK_V && voice_rise[0]) begin
        @(negedge clk); err_clear = 1'b1;
        @(negedge clk); err_clear = 1'b0;
      end
    end
    record_on = 0;
    $display("bandwidth  order shift  data errors/%0d  voice errors/%0d  D.ERR count  V.ERR count",
             N_D, N_V);
    for (int i = 0; i < N; i++) begin
      derr[i] = best_errors(tx_d[i], rx_d[i], LOCK_V * 16, N_D);
      verr[i] = best_errors(tx_v[i], rx_v[i], LOCK_V, N_V);
      $display("%5.2f MHz  %5d %5d  %14d  %15d  %11d  %11d", BW_MHZ[i], ORDERS[i], SHIFTS[i],
               derr[i], verr[i], d_err_count[i], v_err_count[i]);
    end
    for (int i = 0; i < 2; i++) begin
      check(derr[i] == 0, $sformatf("data errors at %0.2f MHz", BW_MHZ[i]));
      check(verr[i] == 0, $sformatf("voice errors at %0.2f MHz", BW_MHZ[i]));
      check(d_err_count[i] == 0, $sformatf("D.ERR at %0.2f MHz", BW_MHZ[i]));
    end
    check(derr[3] > N_D / 10, "data still decoded at 0.48 MHz");
    $display("mechanisms: bandwidths=%0d", N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
