// tb_dvm_system - end-to-end test of the DVM system at its default sizes.
//
// Phases, each started by a reset:
//  1. PN sources at 64, 128 and 256 kb/s voice (edge-aligned with the data
//     clock): after the decoders have synchronised the error counters are
//     cleared, then 40 voice bits (160 to 640 data bits) are sent. The
//     data channel must be error free at all three rates and the voice
//     channel at 64 and 128 kb/s, by the design's own detectors and by the
//     bench's comparison of TX and recovered bits at mid-bit. At 256 kb/s
//     the voice edges, which only show while the data is 1, wander by up
//     to a data bit, a large part of a voice bit, so voice errors are
//     allowed there and counted.
//  2. 160 kb/s (DCP) voice, which is not edge-aligned with the data: the
//     voice channel must still be error free; the data channel sees "vee"
//     notches, which must occur, and its error count must agree with the
//     bench's own count.
//  3. S1 at constant: DATA.BITS must be all ones and VOICE.BITS all zeros.
//  4. S2 at external: the bench encodes its own random bits with DATA.CLK
//     and VOICE.CLK, and those bits must come out of the decoders.
// On every cycle PLUS - MINUS must equal MCD * (MCV ? +1 : -1).
// Mechanisms counted (each must happen at least once): zero-run guard of
// each PN generator, decoder timer skipping a cell-boundary edge, vee
// notch, voice held by the Schmitt trigger through a zero, rate switch,
// S1 constant mode, S2 external mode, error flagged by D.ERR.
module tb_dvm_system;
  import dvm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  voice_rate_e rate_sel = VRATE_64;
  logic s1_random = 1'b1, s2_internal = 1'b1, ext_mcv = 1'b0, ext_mcd = 1'b0, err_clear = 1'b0;
  logic data_clk, voice_clk, data_rise, voice_rise, tx_data, tx_voice, make_a_bit, make_b_bit;
  logic mcd, mcv, plus, minus;
  logic signed [7:0] rcvsig, rcvabs;
  logic r_mcd, r_mcv, d_trig, v_trig, d_clk, v_clk, data_bits, voice_bits;
  logic d_bit_strobe, v_bit_strobe, d_err, v_err;
  logic [31:0] d_err_count, v_err_count;

  int checks = 0, failures = 0;

  dvm_system dut (.*);

  always #24.414 clk = ~clk;   // 20.48 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters --------------------------------------------------
  int n_guard_a = 0, n_guard_b = 0, n_skip = 0, n_vee = 0, n_hold = 0;
  int n_rates = 0, n_const = 0, n_ext = 0, n_derr = 0;
  int n_vee_phase = 0, n_jitter_err = 0;
  logic d_trig_q = 0, r_mcd_q = 0, ga_q = 0, gb_q = 0;
  int low_run = 0;
  bit monitor = 0;

  // bench's own mid-bit comparison
  int my_derr = 0, my_verr = 0;
  bit count_on = 0;

  always @(posedge clk) begin
    #1;
    if (monitor) begin
      // product rule on the line
      check(int'(plus) - int'(minus) == int'(mcd) * (mcv ? 1 : -1), "line product");
      if (make_a_bit && !ga_q) n_guard_a++;
      if (make_b_bit && !gb_q) n_guard_b++;
      if (d_trig && !d_trig_q && !d_clk) n_skip++;
      if (rcvsig == 0 && r_mcv == 1'b0 && mcv) n_hold++;
      if (!r_mcd) low_run++;
      else begin
        if (!r_mcd_q && low_run > 0 && low_run < 5) begin n_vee++; n_vee_phase++; end
        low_run = 0;
      end
    end
    ga_q = make_a_bit; gb_q = make_b_bit; d_trig_q = d_trig; r_mcd_q = r_mcd;
  end

  // the design's error detectors sample on the transmit clocks' falling
  // edges; the bench makes the same comparison independently
  logic data_clk_q = 0, voice_clk_q = 0;
  logic txd_q = 0, txv_q = 0, rxd_q = 0, rxv_q = 0;
  always @(posedge clk) begin
    #2;
    // values just before the falling edge are those of the previous cycle
    if (count_on && data_clk_q && !data_clk && (txd_q != rxd_q)) my_derr++;
    if (count_on && voice_clk_q && !voice_clk && (txv_q != rxv_q)) my_verr++;
    data_clk_q = data_clk; voice_clk_q = voice_clk;
    txd_q = tx_data; txv_q = tx_voice; rxd_q = data_bits; rxv_q = voice_bits;
  end

  task automatic do_reset();
    @(negedge clk); rst_n = 1'b0;
    repeat (3) @(negedge clk); rst_n = 1'b1;
  endtask

  task automatic wait_voice_bits(int n);
    for (int k = 0; k < n; k++) begin
      @(posedge clk); while (!voice_rise) @(posedge clk);
    end
  endtask

  task automatic clear_counts();
    @(negedge clk); err_clear = 1'b1;
    @(negedge clk); err_clear = 1'b0;
    my_derr = 0; my_verr = 0;
    count_on = 1;
  endtask

  task automatic run_rate(voice_rate_e r, bit expect_clean, bit voice_clean, int nbits);
    int dbits;
    rate_sel = r;
    s1_random = 1'b1; s2_internal = 1'b1;
    do_reset();
    n_rates++;
    wait_voice_bits(20);           // start-up guard (15 bits) and decoder lock
    clear_counts();
    n_vee_phase = 0;
    wait_voice_bits(nbits);
    @(negedge clk);
    count_on = 0;
    dbits = nbits * int'(voice_div(r)) / int'(DATA_DIV);
    $display("rate %s: %0d voice bits, %0d data bits, data errors %0d, voice errors %0d, vees %0d",
             r.name(), nbits, dbits, d_err_count, v_err_count, n_vee_phase);
    check(d_err_count == 32'(my_derr), $sformatf("data error count %0d, bench %0d", d_err_count, my_derr));
    check(v_err_count == 32'(my_verr), $sformatf("voice error count %0d, bench %0d", v_err_count, my_verr));
    if (voice_clean) check(v_err_count == 0, $sformatf("voice errors at %s", r.name()));
    else if (v_err_count > 0) n_jitter_err++;
    if (expect_clean) begin
      check(d_err_count == 0, $sformatf("data errors at %s", r.name()));
      check(n_vee_phase == 0, $sformatf("vees at %s", r.name()));
    end else begin
      check(n_vee_phase > 0, "no vee at the DCP rate");
      check(d_err_count < 32'(dbits / 4), "data error rate at DCP rate above 1/4");
    end
  endtask

  initial begin
    bit ext_d [$];
    bit ext_v [$];
    int nd, nv, ok_d, ok_v;
    repeat (2) @(negedge clk);
    monitor = 1;

    run_rate(VRATE_64,  1, 1, 40);
    run_rate(VRATE_128, 1, 1, 40);
    run_rate(VRATE_160, 0, 1, 100);
    run_rate(VRATE_256, 1, 0, 40);

    // ---- S1 constant ---------------------------------------------------
    // switched from random to constant without a reset, so the decoders
    // stay locked (constant bits alone give them nothing to lock on)
    rate_sel = VRATE_64; s1_random = 1'b1; s2_internal = 1'b1;
    do_reset();
    wait_voice_bits(20);
    s1_random = 1'b0;
    wait_voice_bits(2);
    n_const++;
    for (int k = 0; k < 8 * 320; k++) begin
      @(posedge clk); #1;
      if (d_bit_strobe) check(data_bits == 1'b1, "constant data bits");
      if (v_bit_strobe) check(voice_bits == 1'b0, "constant voice bits");
    end

    // ---- S2 external ---------------------------------------------------
    rate_sel = VRATE_128; s1_random = 1'b1; s2_internal = 1'b0;
    do_reset();
    n_ext++;
    clear_counts();
    fork
      begin : ext_drive
        bit bd, bv;
        bd = 0; bv = 0;
        forever begin
          @(posedge clk);
          if (data_rise)  begin bd = 1'($urandom); ext_d.push_back(bd); end
          if (voice_rise) begin bv = 1'($urandom); ext_v.push_back(bv); end
          #1;
          ext_mcd = data_clk ^ bd;
          ext_mcv = voice_clk ^ bv;
        end
      end
      begin : ext_check
        // the decoded sequences must contain the sent sequences, shifted by
        // at most two bits (bits lost or gained before the decoders lock)
        bit rd [$];
        bit rv [$];
        repeat (40 * 160) begin
          @(posedge clk); #1;
          if (d_bit_strobe) rd.push_back(data_bits);
          if (v_bit_strobe) rv.push_back(voice_bits);
        end
        ok_d = 0; ok_v = 0; nd = 0; nv = 0;
        for (int lag = -2; lag <= 2; lag++) begin
          int md = 0, mv = 0;
          for (int i = 30; i + lag < rd.size() && i < ext_d.size(); i++) begin
            md += (rd[i + lag] == ext_d[i]);
            if (lag == -2) nd++;
          end
          for (int i = 8; i + lag < rv.size() && i < ext_v.size(); i++) begin
            mv += (rv[i + lag] == ext_v[i]);
            if (lag == -2) nv++;
          end
          if (md > ok_d) ok_d = md;
          if (mv > ok_v) ok_v = mv;
        end
        check(nd > 200 && ok_d >= nd - 1, $sformatf("external data %0d of %0d", ok_d, nd));
        check(nv > 20 && ok_v >= nv - 1, $sformatf("external voice %0d of %0d", ok_v, nv));
        disable ext_drive;
      end
    join
    // the internal PN stream differs from the external one, so the error
    // detector must have flagged errors
    n_derr = int'(d_err_count);
    check(d_err_count == 32'(my_derr), "error count in external mode");
    s2_internal = 1'b1;

    $display("mechanisms: guardA=%0d guardB=%0d timer_skip=%0d vee=%0d voice_hold=%0d rates=%0d const=%0d ext=%0d derr=%0d jitter_err=%0d",
             n_guard_a, n_guard_b, n_skip, n_vee, n_hold, n_rates, n_const, n_ext, n_derr, n_jitter_err);
    check(n_guard_a > 0, "voice zero-run guard never fired");
    check(n_guard_b > 0, "data zero-run guard never fired");
    check(n_skip > 0, "decoder timer never skipped an edge");
    check(n_vee > 0, "no vee seen");
    check(n_hold > 0, "voice trigger never held through a zero");
    check(n_rates == 4, "rate switch");
    check(n_const > 0 && n_ext > 0, "source switches");
    check(n_derr > 0, "error detector never flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
