// twisted_pair_channel - behavioural model of the channel: transmit pulse
// transformer, twisted pair and receive pulse transformer.
//
// The channel is modelled as a low-pass filter on the sampled line signal:
// a cascade of ORDER identical first-order sections, each computing
// y <= y + (x - y) / 2^SHIFT once per master cycle (20.48 MHz), where x of
// a section is the new value of the section before it (so the cascade
// adds one cycle of latency in all). With the defaults (two sections,
// SHIFT = 1) the output moves a quarter of a step one cycle after the
// step, half of it after two cycles and 97 % after about eight, i.e.
// within one half data bit (10 cycles); the -3 dB bandwidth is about
// 1.5 MHz.
// This stands in for the cable-and-transformer response of the prototype,
// whose derivation (per-frequency line constants of the cable) is outside
// this model; it is enough to make the channel smear transitions, which is
// what produces the "vee" notches at the 160 kb/s voice rate.
// The transformers' low-frequency cut-off is not modelled: the DVM signal
// has no DC, so it changes little. Internal precision has 4 fraction
// bits; the output is truncated back to SAMPLE_W bits.
module twisted_pair_channel #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned ORDER    = 2,   // number of first-order sections
  parameter int unsigned SHIFT    = 1    // section coefficient 2^-SHIFT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] chanin,
  output logic signed [SAMPLE_W-1:0] chout
);

  localparam int unsigned FRAC = 4;
  localparam int unsigned IW   = SAMPLE_W + FRAC;

  logic signed [IW-1:0] y_q [ORDER];
  logic signed [IW-1:0] y_d [ORDER];
  logic signed [IW-1:0] x_s [ORDER];

  always_comb begin
    x_s[0] = IW'(chanin) <<< FRAC;
    y_d[0] = y_q[0] + ((x_s[0] - y_q[0]) >>> SHIFT);
    for (int k = 1; k < ORDER; k++) begin
      x_s[k] = y_d[k-1];
      y_d[k] = y_q[k] + ((x_s[k] - y_q[k]) >>> SHIFT);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) y_q[k] <= '0;
    end else begin
      for (int k = 0; k < ORDER; k++) y_q[k] <= y_d[k];
    end
  end

  assign chout = SAMPLE_W'(y_q[ORDER-1] >>> FRAC);

endmodule
