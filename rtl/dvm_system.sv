// dvm_system - data and voice multiplexer (DVM) test system, top level.
//
// One Manchester coded 1024 kb/s LAN data stream and one Manchester coded
// voice stream (64, 128 or 160 kb/s, or 256 kb/s) share one twisted pair.
// The multiplexer sends their product as the difference of two logic lines
// (PLUS, MINUS); the receiver forms PLUS - MINUS, a three-level signal
// whose sign is the voice stream and whose magnitude is the data stream,
// and splits it again with a Schmitt trigger and an absolute value. Each
// stream is then Manchester decoded and checked against what was sent.
//
// Signal path (master clock CLK.20480 = clk, 20.48 MHz):
//   dvm_clock_gen -> pn_generator x2 -> dvm_sources (S1, encoders, S2)
//   -> dvm_mux -> line_driver -> twisted_pair_channel -> diff_amp
//   -> dvm_demux -> manchester_decoder x2 -> error_detector x2
// The rate switch S3 selects VOICE.CLK and, with it, the voice decoder's
// 3/4-bit timer length; the data decoder's timer is fixed at 15 cycles.
// A decoder recovers bit n from its first half, sampled a quarter bit into
// it, and the error detectors compare at mid-bit, so the line, filter,
// trigger and decoder delays together must stay under a quarter bit
// (5 cycles for data). With the defaults DATA.BITS carries bit n from
// 9 cycles after TX.DATA changed, one cycle before the comparison.
// The partitioning follows the prototype; the line, channel and amplifier
// are behavioural stand-ins for analog parts, and the sampled-signal
// levels (line amplitude 32, received level 64, trigger levels) are this
// model's choices.
module dvm_system
  import dvm_pkg::*;
#(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned CH_ORDER = 2,
  parameter int unsigned CH_SHIFT = 1
) (
  input  logic                       clk,          // CLK.20480
  input  logic                       rst_n,
  input  voice_rate_e                rate_sel,     // S3
  input  logic                       s1_random,    // S1: 1 random, 0 constant
  input  logic                       s2_internal,  // S2: 1 internal, 0 external
  input  logic                       ext_mcv,      // EXT.MCV
  input  logic                       ext_mcd,      // EXT.MCD
  input  logic                       err_clear,    // clears the error counters
  output logic                       data_clk,     // DATA.CLK
  output logic                       voice_clk,    // VOICE.CLK
  output logic                       data_rise,    // DATA.CLK rises next cycle
  output logic                       voice_rise,   // VOICE.CLK rises next cycle
  output logic                       tx_data,      // TX.DATA
  output logic                       tx_voice,     // TX.VOICE
  output logic                       make_a_bit,   // voice PN zero-run guard
  output logic                       make_b_bit,   // data PN zero-run guard
  output logic                       mcd,          // MCD
  output logic                       mcv,          // MCV
  output logic                       plus,         // PLUS
  output logic                       minus,        // MINUS
  output logic signed [SAMPLE_W-1:0] rcvsig,       // RCVSIG
  output logic signed [SAMPLE_W-1:0] rcvabs,       // RCVABS
  output logic                       r_mcd,        // R.MCD
  output logic                       r_mcv,        // R.MCV
  output logic                       d_trig,       // D.TRIG
  output logic                       v_trig,       // V.TRIG
  output logic                       d_clk,        // D.CLK
  output logic                       v_clk,        // V.CLK
  output logic                       data_bits,    // DATA.BITS
  output logic                       voice_bits,   // VOICE.BITS
  output logic                       d_bit_strobe, // DATA.BITS updated
  output logic                       v_bit_strobe, // VOICE.BITS updated
  output logic                       d_err,        // D.ERR
  output logic                       v_err,        // V.ERR
  output logic [31:0]                d_err_count,
  output logic [31:0]                v_err_count
);

  localparam int          DRIVE     = 32;            // line amplitude
  localparam int          RX_LEVEL  = 2 * DRIVE;     // RCVSIG level after gain 2
  localparam int unsigned TIMER_W   = 9;

  // ---- clocks -----------------------------------------------------------
  logic clk_256, clk_128, clk_64, clk_160, data_fall, voice_fall;

  dvm_clock_gen u_clk (
    .clk, .rst_n, .rate_sel,
    .data_clk, .clk_256, .clk_128, .clk_64, .clk_160, .voice_clk,
    .data_rise, .data_fall, .voice_rise, .voice_fall);

  // ---- PN sources -------------------------------------------------------
  logic pn_voice, pn_data;
  logic pnv_d1, pnv_d2, pnd_d1, pnd_d2;

  pn_generator u_pn_voice (
    .clk, .rst_n, .shift_en(voice_rise),
    .pn_out(pn_voice), .pn_dly1(pnv_d1), .pn_dly2(pnv_d2), .make_bit(make_a_bit));

  pn_generator u_pn_data (
    .clk, .rst_n, .shift_en(data_rise),
    .pn_out(pn_data), .pn_dly1(pnd_d1), .pn_dly2(pnd_d2), .make_bit(make_b_bit));

  // ---- switches and encoders ---------------------------------------------
  logic int_mcd, int_mcv;

  dvm_sources u_src (
    .data_clk, .voice_clk, .pn_data, .pn_voice, .s1_random, .s2_internal,
    .ext_mcd, .ext_mcv, .tx_data, .tx_voice, .int_mcd, .int_mcv, .mcd, .mcv);

  // ---- multiplexer ------------------------------------------------------
  dvm_mux u_mux (.mcv, .mcd, .plus, .minus);

  // ---- line, channel, receiver amplifier ---------------------------------
  logic signed [SAMPLE_W-1:0] chanin, chout;

  line_driver #(.SAMPLE_W(SAMPLE_W), .DRIVE(DRIVE)) u_drv (.plus, .minus, .chanin);

  twisted_pair_channel #(.SAMPLE_W(SAMPLE_W), .ORDER(CH_ORDER), .SHIFT(CH_SHIFT)) u_ch (
    .clk, .rst_n, .chanin, .chout);

  diff_amp #(.SAMPLE_W(SAMPLE_W), .GAIN(2)) u_amp (.vin(chout), .rcvsig);

  // ---- demultiplexer ----------------------------------------------------
  dvm_demux #(.SAMPLE_W(SAMPLE_W), .V_TH(RX_LEVEL / 2),
              .D_LOW_TH(3 * RX_LEVEL / 8), .D_HIGH_TH(5 * RX_LEVEL / 8)) u_demux (
    .clk, .rst_n, .rcvsig, .rcvabs, .r_mcv, .r_mcd);

  // ---- Manchester decoders ---------------------------------------------
  logic [TIMER_W-1:0] v_timer_len;
  always_comb v_timer_len = TIMER_W'(timer_len(voice_div(rate_sel)));

  manchester_decoder #(.DLY(1), .TIMER_W(TIMER_W)) u_dec_d (
    .clk, .rst_n, .mc(r_mcd), .timer_len(TIMER_W'(timer_len(DATA_DIV))),
    .trig(d_trig), .rclk(d_clk), .nrz(data_bits), .bit_strobe(d_bit_strobe));

  manchester_decoder #(.DLY(1), .TIMER_W(TIMER_W)) u_dec_v (
    .clk, .rst_n, .mc(r_mcv), .timer_len(v_timer_len),
    .trig(v_trig), .rclk(v_clk), .nrz(voice_bits), .bit_strobe(v_bit_strobe));

  // ---- error detection --------------------------------------------------
  error_detector #(.CNT_W(32)) u_err_d (
    .clk, .rst_n, .clear(err_clear), .tx_clk_fall(data_fall),
    .tx_bit(tx_data), .rx_bit(data_bits), .err(d_err), .err_count(d_err_count));

  error_detector #(.CNT_W(32)) u_err_v (
    .clk, .rst_n, .clear(err_clear), .tx_clk_fall(voice_fall),
    .tx_bit(tx_voice), .rx_bit(voice_bits), .err(v_err), .err_count(v_err_count));

endmodule
