// dvm_sources - source selection and Manchester encoding ahead of the DVM.
//
// Switch S1 picks, for both channels at once, either the PN streams or
// constant bits: a constant 1 for data and a constant 0 for voice, so the
// encoders send continuous 1s and 0s. The two NRZ streams (TX.DATA,
// TX.VOICE) are Manchester coded with their bit clocks (INT.MCD, INT.MCV).
// Switch S2 then picks the internal coded streams or external ones from
// the front-panel connector as MCD and MCV, the inputs of the multiplexer.
// Everything here is combinational and follows the prototype's source
// sheets; the switch polarities (1 = random, 1 = internal) are this
// model's encoding.
module dvm_sources (
  input  logic data_clk,     // DATA.CLK
  input  logic voice_clk,    // VOICE.CLK
  input  logic pn_data,      // PN.DATA
  input  logic pn_voice,     // PN.VOICE
  input  logic s1_random,    // 1: PN bits, 0: constant bits
  input  logic s2_internal,  // 1: internal coders, 0: external streams
  input  logic ext_mcd,      // EXT.MCD
  input  logic ext_mcv,      // EXT.MCV
  output logic tx_data,      // TX.DATA
  output logic tx_voice,     // TX.VOICE
  output logic int_mcd,      // INT.MCD
  output logic int_mcv,      // INT.MCV
  output logic mcd,          // MCD
  output logic mcv           // MCV
);

  always_comb begin
    tx_data  = s1_random ? pn_data  : 1'b1;
    tx_voice = s1_random ? pn_voice : 1'b0;
  end

  manchester_encoder u_enc_d (.bit_clk(data_clk),  .nrz(tx_data),  .mc(int_mcd));
  manchester_encoder u_enc_v (.bit_clk(voice_clk), .nrz(tx_voice), .mc(int_mcv));

  always_comb begin
    mcd = s2_internal ? int_mcd : ext_mcd;
    mcv = s2_internal ? int_mcv : ext_mcv;
  end

endmodule
