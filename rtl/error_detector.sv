// error_detector - bit error check between a transmitted and a recovered
// NRZ stream.
//
// The two streams are compared with an exclusive-or whose output a D
// flip-flop samples on the falling edge of the transmit bit clock, the
// middle of the transmitted bit. A mismatch sets err for that bit period
// (D.ERR / V.ERR on the prototype) and adds one to err_count, which
// saturates at its maximum. The comparison is only right while the
// recovered stream lags the transmitted one by less than half a bit, as in
// the prototype. tx_clk_fall is a one-cycle strobe, high in the master
// cycle before the transmit clock falls; clear resets the counter.
// The XOR and flip-flop are the prototype's; the counter follows the
// error counter of its simulation model.
module error_detector #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             tx_clk_fall,
  input  logic             tx_bit,
  input  logic             rx_bit,
  output logic             err,
  output logic [CNT_W-1:0] err_count
);

  logic cmp;
  assign cmp = tx_bit ^ rx_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= 1'b0;
      err_count <= '0;
    end else begin
      if (tx_clk_fall) err <= cmp;
      if (clear)
        err_count <= '0;
      else if (tx_clk_fall && cmp && err_count != '1)
        err_count <= err_count + 1'b1;
    end
  end

endmodule
