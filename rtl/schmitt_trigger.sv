// schmitt_trigger - comparator with hysteresis on a sampled signal.
//
// The output goes high when the input reaches HIGH_TH or more, goes low
// when it reaches LOW_TH or less, and otherwise keeps its value, so a signal that
// wanders between the two trigger levels does not toggle it. This is how
// the DVM receiver tells a voice transition (a swing from full negative to
// full positive, crossing both levels) from a data transition (a swing
// between zero and one polarity, crossing at most one). The last output
// value is held in a flip-flop and the output itself is combinational, so
// it follows the input in the same cycle, like the analog part, which has
// no clock delay. Non-inverting; resets low. Trigger levels are
// parameters in sample units.
module schmitt_trigger #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int          LOW_TH   = -32,
  parameter int          HIGH_TH  = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] sig_in,
  output logic                       sig_out
);

  localparam logic signed [SAMPLE_W-1:0] LO = SAMPLE_W'(LOW_TH);
  localparam logic signed [SAMPLE_W-1:0] HI = SAMPLE_W'(HIGH_TH);

  logic state_q;

  always_comb begin
    if (sig_in >= HI)      sig_out = 1'b1;
    else if (sig_in <= LO) sig_out = 1'b0;
    else                   sig_out = state_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= 1'b0;
    else        state_q <= sig_out;
  end

  initial begin
    assert (LOW_TH < HIGH_TH) else $error("schmitt_trigger: LOW_TH must be below HIGH_TH");
  end

endmodule
