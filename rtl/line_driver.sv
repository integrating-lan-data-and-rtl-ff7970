// line_driver - behavioural model of the two transmit line drivers.
//
// In the prototype each of PLUS and MINUS drives a transistor totem pole
// that switches a 50 ohm resistor to +5 V or ground; the two resistors
// feed the two ends of the transmit transformer's primary, so the current
// through it, and the voltage it passes on, follows PLUS - MINUS. This
// model gives that differential drive as a signed sample:
// chanin = DRIVE * (plus - minus), i.e. +DRIVE, 0 or -DRIVE. DRIVE sets the
// line amplitude in sample units and is this model's choice. It is not
// synthesizable hardware in the original sense (the real part is analog);
// it is written as plain combinational logic so the whole chain simulates
// on one clock.
module line_driver #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int          DRIVE    = 32
) (
  input  logic                       plus,
  input  logic                       minus,
  output logic signed [SAMPLE_W-1:0] chanin  // differential line voltage
);

  localparam logic signed [SAMPLE_W-1:0] POS = SAMPLE_W'(DRIVE);
  localparam logic signed [SAMPLE_W-1:0] NEG = SAMPLE_W'(-DRIVE);

  always_comb begin
    case ({plus, minus})
      2'b10:   chanin = POS;
      2'b01:   chanin = NEG;
      default: chanin = '0;   // both lines at the same level
    endcase
  end

endmodule
