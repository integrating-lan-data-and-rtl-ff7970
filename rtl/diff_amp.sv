// diff_amp - behavioural model of the receive differential amplifier.
//
// The receive transformer's floating secondary drives an op-amp difference
// amplifier with a gain of 2; its output is RCVSIG, the recovered
// three-level DVM signal referred to ground. Here the difference has
// already been formed by the line model, so the block scales the channel
// output by GAIN and saturates at the sample range, as an amplifier clips
// at its rails. Combinational. The gain is the prototype's; the clipping
// is this model's.
module diff_amp #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int          GAIN     = 2
) (
  input  logic signed [SAMPLE_W-1:0] vin,     // transformer secondary
  output logic signed [SAMPLE_W-1:0] rcvsig   // RCVSIG
);

  localparam int W2 = SAMPLE_W + 8;
  localparam logic signed [W2-1:0] MAXV = W2'((1 <<< (SAMPLE_W-1)) - 1);
  localparam logic signed [W2-1:0] MINV = -MAXV;

  logic signed [W2-1:0] prod;

  always_comb begin
    prod = W2'(vin) * W2'(GAIN);
    if (prod > MAXV)      rcvsig = SAMPLE_W'(MAXV);
    else if (prod < MINV) rcvsig = SAMPLE_W'(MINV);
    else                  rcvsig = SAMPLE_W'(prod);
  end

endmodule
