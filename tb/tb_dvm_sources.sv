// tb_dvm_sources - checks switches S1/S2 and the two encoders.
//
// Walks every combination of inputs and compares all six outputs with the
// switch rules: S1 random passes the PN bits, constant gives data 1 and
// voice 0; the internal streams are bit clock XOR bit; S2 internal passes
// them, external passes EXT.MCD/EXT.MCV.
module tb_dvm_sources;
  logic data_clk, voice_clk, pn_data, pn_voice, s1_random, s2_internal, ext_mcd, ext_mcv;
  logic tx_data, tx_voice, int_mcd, int_mcv, mcd, mcv;
  int checks = 0, failures = 0;

  dvm_sources dut (.*);

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
    bit etd, etv, emd, emv;
    for (int i = 0; i < 256; i++) begin
      {data_clk, voice_clk, pn_data, pn_voice, s1_random, s2_internal, ext_mcd, ext_mcv} = 8'(i);
      #1;
      etd = s1_random ? pn_data : 1'b1;
      etv = s1_random ? pn_voice : 1'b0;
      emd = s2_internal ? (data_clk ^ etd) : ext_mcd;
      emv = s2_internal ? (voice_clk ^ etv) : ext_mcv;
      check(tx_data == etd && tx_voice == etv, $sformatf("tx bits, case %0d", i));
      check(int_mcd == (data_clk ^ etd) && int_mcv == (voice_clk ^ etv), $sformatf("internal coders, case %0d", i));
      check(mcd == emd && mcv == emv, $sformatf("S2 outputs, case %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
