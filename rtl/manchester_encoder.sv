// manchester_encoder - Manchester code of one NRZ stream.
//
// The code is the exclusive-or of the bit clock and the NRZ bit, as in the
// prototype's encoders. The NRZ bit changes on the rising clock edge that
// opens a cell, so the first half of a cell (clock high) carries the
// inverted bit and the second half the bit: a 0 goes out as 1-then-0, a 1
// as 0-then-1, and every cell has a transition at its centre.
// Purely combinational; with bit_clk and nrz both coming from flip-flops
// of the same master clock, mc has no glitches.
module manchester_encoder (
  input  logic bit_clk,  // bit-rate square wave
  input  logic nrz,      // NRZ bit, updated on the rising edge of bit_clk
  output logic mc        // Manchester coded stream
);

  always_comb mc = bit_clk ^ nrz;

endmodule
