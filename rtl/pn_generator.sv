// pn_generator - pseudo-noise bit source used to test the DVM.
//
// A 16-stage shift register of which the first 14 stages form a maximal
// length generator: the exclusive-or of stages 2, 12, 13 and 14 is fed
// back into stage 1, giving a sequence of 2^14-1 = 16383 bits. Stages 15
// and 16 only provide delayed copies of the output. The output is stage 14.
//
// A zero-run guard stops the generator from locking up in the all-zero
// state: a 4-bit counter is loaded with 1 by every 1 that leaves the
// generator and counts up on every 0. After fourteen zeros in a row it
// reaches 15 (make_bit). Then the register outputs are treated as
// disabled and pulled high, so the output and the feedback read 1, and
// the next shift restarts the sequence. A running m-sequence has at most
// 13 zeros in a row, so the guard only acts on start-up.
//
// The taps, register lengths and guard follow the prototype. Reset clears
// register and counter, so every start-up goes through the guard (15
// shifts of 0, then the sequence begins); this is this model's stand-in
// for the random power-up contents of the real register.
// shift_en is a one-cycle strobe in the master-clock domain (the rising
// edge of the bit clock).
module pn_generator #(
  parameter int unsigned SR_LEN = 16,  // shift register stages
  parameter int unsigned PN_LEN = 14   // stages inside the feedback loop
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift_en,
  output logic pn_out,     // PN stream (last stage of the generator)
  output logic pn_dly1,    // output delayed by one bit
  output logic pn_dly2,    // output delayed by two bits
  output logic make_bit    // zero-run guard active
);

  logic [SR_LEN:1] sr_q;    // stage 1 .. SR_LEN
  logic [3:0]      zc_q;    // zero-run counter
  logic            fb;

  assign make_bit = (zc_q == 4'd15);
  assign pn_out   = make_bit ? 1'b1 : sr_q[PN_LEN];
  assign pn_dly1  = sr_q[PN_LEN+1];
  assign pn_dly2  = sr_q[PN_LEN+2];
  assign fb       = make_bit ? 1'b1
                             : (sr_q[2] ^ sr_q[12] ^ sr_q[13] ^ sr_q[PN_LEN]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q <= '0;
      zc_q <= '0;
    end else if (shift_en) begin
      sr_q <= {sr_q[SR_LEN-1:1], fb};
      zc_q <= pn_out ? 4'd1 : zc_q + 4'd1;
    end
  end

  initial begin
    assert (PN_LEN == 14 && SR_LEN >= PN_LEN + 2)
      else $error("pn_generator: taps are fixed for a 14-stage generator");
  end

endmodule
