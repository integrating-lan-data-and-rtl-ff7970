// manchester_decoder - recovers the bit clock and the NRZ bits from one
// Manchester coded stream.
//
// How it works (all in master-clock cycles):
//  * the input is delayed by DLY cycles and exclusive-or'ed with itself,
//    giving a TRIG pulse DLY cycles wide at every edge of the stream;
//  * a non-retriggerable one-shot timer starts on the rising edge of TRIG
//    and stays on for timer_len cycles (three quarters of a bit); TRIG is
//    ignored while it runs. Centre-of-cell edges come once per bit, the
//    optional cell-boundary edges half a bit after a centre edge, so once
//    the timer has started on a centre edge it skips every boundary edge
//    and restarts on the next centre edge. It falls into step on the first
//    0-1 or 1-0 bit pair, whose boundary has no edge;
//  * the end of the timer (rising edge of the timer's inverted output,
//    rclk, the recovered clock) samples the stream a quarter bit into the
//    next cell, i.e. in its first half. A 0 is sent as 1-then-0 and a 1 as
//    0-then-1, so the NRZ bit is the inverted sample.
// nrz and bit_strobe change one cycle after the sample point. The first
// bit after reset, or after a lost lock, may be wrong until the timer has
// synchronised, as in the prototype.
// The structure (delay, XOR, 3/4-bit non-retriggerable timer, D flip-flop
// taking the inverted sample) follows the prototype. timer_len is an input
// because the prototype trims each timer with a potentiometer chosen by
// the rate switch; DLY = 1 cycle (48.8 ns) stands for the 30-40 ns of the
// two gate delays used there.
module manchester_decoder #(
  parameter int unsigned DLY     = 1,  // TRIG pulse width, cycles (>= 1)
  parameter int unsigned TIMER_W = 9   // width of the timer length
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mc,         // recovered Manchester stream
  input  logic [TIMER_W-1:0] timer_len,  // timer on-time, cycles (>= 2)
  output logic               trig,       // TRIG
  output logic               rclk,       // recovered clock (timer Q bar)
  output logic               nrz,        // recovered NRZ bits
  output logic               bit_strobe  // one cycle when nrz is updated
);

  logic [DLY:1]       dly_q;   // dly_q[k]: the input k cycles late
  logic [DLY:0]       tap;
  logic               mcdly;
  logic               trig_q;
  logic [TIMER_W-1:0] cnt_q;
  logic               running;
  logic               timer_end;

  assign tap       = {dly_q, mc};
  assign mcdly     = dly_q[DLY];
  assign trig      = mc ^ mcdly;
  assign running   = (cnt_q != '0);
  assign timer_end = running && (cnt_q == timer_len);
  assign rclk      = ~running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_q      <= '0;
      trig_q     <= 1'b0;
      cnt_q      <= '0;
      nrz        <= 1'b0;
      bit_strobe <= 1'b0;
    end else begin
      dly_q      <= tap[DLY-1:0];
      trig_q     <= trig;
      bit_strobe <= 1'b0;
      if (running) begin
        if (timer_end) begin
          cnt_q      <= '0;
          nrz        <= ~mc;     // inverted sample
          bit_strobe <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end else if (trig && !trig_q) begin
        cnt_q <= TIMER_W'(1);
      end
    end
  end

  initial begin
    assert (DLY >= 1) else $error("manchester_decoder: DLY must be at least 1");
  end

endmodule
