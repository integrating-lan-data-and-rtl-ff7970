// dvm_mux - the DVM multiplexer: forms the product of the Manchester voice
// and data streams as the difference of two logic lines.
//
// A dual 4-to-1 multiplexer is wired as two code tables that share their
// select inputs, B = MCV and A = MCD. Table entry {B,A} of PLUS_CODE drives
// PLUS and the same entry of MINUS_CODE drives MINUS. With the default
// codes PLUS = MCV & MCD and MINUS = ~MCV & MCD, so PLUS - MINUS is +1 when
// voice is high and data high, -1 when voice is low and data high, and 0
// whenever data is low: the data stream (0/1) times the voice stream read
// as -1/+1. The receiver recovers the three-level signal by subtraction.
// The code table is the prototype's; combinational, no clock.
module dvm_mux #(
  parameter logic [3:0] PLUS_CODE  = 4'b1000,  // bit {MCV,MCD}: 00,01,10,11 -> 0,0,0,1
  parameter logic [3:0] MINUS_CODE = 4'b0010   // bit {MCV,MCD}: 00,01,10,11 -> 0,1,0,0
) (
  input  logic mcv,    // select B
  input  logic mcd,    // select A
  output logic plus,   // Mux1 output
  output logic minus   // Mux2 output
);

  logic [1:0] sel;

  always_comb begin
    sel   = {mcv, mcd};
    plus  = PLUS_CODE[sel];
    minus = MINUS_CODE[sel];
  end

endmodule
