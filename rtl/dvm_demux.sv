// dvm_demux - the DVM demultiplexer: splits the received three-level
// signal RCVSIG back into Manchester voice and Manchester data.
//
// Voice: RCVSIG is +LEVEL, 0 or -LEVEL; its sign is the voice stream and
// the data only switches it between full and zero amplitude. A Schmitt
// trigger with trigger levels at +/-V_TH (half the level) follows the sign:
// a data transition (between 0 and one polarity) crosses only one trigger
// level and leaves it unchanged, a voice transition (between the two
// polarities) crosses both. While the data is 0 the trigger holds its last
// value, so a voice edge shows only once the data returns to 1.
// Data: the absolute value removes the voice sign and leaves the data
// amplitude; a second Schmitt trigger with levels D_LOW_TH/D_HIGH_TH turns
// the rounded |RCVSIG| into logic (R.MCD).
// Both outputs are combinational (the triggers keep their state in a
// flip-flop), so they follow RCVSIG in the same cycle. The structure (sign
// trigger, absolute value, trigger) is the prototype's; the levels in
// sample units and the non-inverting outputs are this model's (the real
// triggers are inverting TTL parts whose inversion the decoders undo).
module dvm_demux #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int          V_TH     = 32,   // voice trigger levels +/-V_TH
  parameter int          D_LOW_TH = 24,   // data trigger, lower level
  parameter int          D_HIGH_TH = 40   // data trigger, upper level
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] rcvsig,  // RCVSIG
  output logic signed [SAMPLE_W-1:0] rcvabs,  // RCVABS
  output logic                       r_mcv,   // R.MCV
  output logic                       r_mcd    // R.MCD
);

  localparam logic signed [SAMPLE_W-1:0] MAXV = {1'b0, {(SAMPLE_W-1){1'b1}}};

  // Absolute value; the most negative sample maps to the largest positive.
  always_comb begin
    if (rcvsig >= 0)         rcvabs = rcvsig;
    else if (rcvsig == -MAXV - 1) rcvabs = MAXV;
    else                     rcvabs = -rcvsig;
  end

  schmitt_trigger #(.SAMPLE_W(SAMPLE_W), .LOW_TH(-V_TH), .HIGH_TH(V_TH)) u_voice (
    .clk, .rst_n, .sig_in(rcvsig), .sig_out(r_mcv));

  schmitt_trigger #(.SAMPLE_W(SAMPLE_W), .LOW_TH(D_LOW_TH), .HIGH_TH(D_HIGH_TH)) u_data (
    .clk, .rst_n, .sig_in(rcvabs), .sig_out(r_mcd));

endmodule
