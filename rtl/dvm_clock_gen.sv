// dvm_clock_gen - bit-rate clocks of the DVM, derived from the 20.48 MHz
// master clock.
//
// Two divider chains, as on the prototype's clock sheet:
//  * chain 1, a 7-bit binary counter, divides by 128 to give the 160 kHz
//    DCP voice clock (CLK.160, the counter's top bit);
//  * chain 2, a decade counter whose terminal count enables a 5-bit binary
//    counter, divides by 10 and then by 2, 8, 16 and 32 to give DATA.CLK
//    (1024 kHz) and the 256, 128 and 64 kHz voice clocks.
// The rate switch picks one voice clock as VOICE.CLK.
//
// All clocks are 50 % square waves held in master-clock flip-flops. Logic
// fed by them runs on the master clock, so the module also gives one-cycle
// strobes *_rise / *_fall that are high in the cycle before the clock level
// changes: a register enabled by data_rise updates on the same master edge
// on which data_clk goes high. Both counters clear on reset, so the data
// clock first rises 10 master cycles after reset. Because 64/128/256 kHz
// come from the same counter as DATA.CLK, their edges land on DATA.CLK
// falling edges (data bit centres); the 160 kHz chain bears no fixed phase
// to DATA.CLK. The divider structure and the ratios follow the prototype;
// the strobe outputs are this model's way of keeping one clock domain.
module dvm_clock_gen
  import dvm_pkg::*;
(
  input  logic        clk,        // CLK.20480
  input  logic        rst_n,
  input  voice_rate_e rate_sel,   // rate switch
  output logic        data_clk,   // DATA.CLK, 1024 kHz
  output logic        clk_256,
  output logic        clk_128,
  output logic        clk_64,
  output logic        clk_160,
  output logic        voice_clk,  // VOICE.CLK
  output logic        data_rise,
  output logic        data_fall,
  output logic        voice_rise,
  output logic        voice_fall
);

  logic [3:0] dec_q, dec_d;   // decade counter (chain 2, first stage)
  logic [4:0] bin_q, bin_d;   // binary counters of chain 2
  logic [6:0] c160_q, c160_d; // chain 1

  always_comb begin
    dec_d  = (dec_q == 4'd9) ? 4'd0 : dec_q + 4'd1;
    bin_d  = (dec_q == 4'd9) ? bin_q + 5'd1 : bin_q;
    c160_d = c160_q + 7'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_q  <= '0;
      bin_q  <= '0;
      c160_q <= '0;
    end else begin
      dec_q  <= dec_d;
      bin_q  <= bin_d;
      c160_q <= c160_d;
    end
  end

  assign data_clk = bin_q[0];
  assign clk_256  = bin_q[2];
  assign clk_128  = bin_q[3];
  assign clk_64   = bin_q[4];
  assign clk_160  = c160_q[6];

  logic voice_next;
  always_comb begin
    case (rate_sel)
      VRATE_64:  begin voice_clk = bin_q[4];  voice_next = bin_d[4];  end
      VRATE_128: begin voice_clk = bin_q[3];  voice_next = bin_d[3];  end
      VRATE_160: begin voice_clk = c160_q[6]; voice_next = c160_d[6]; end
      default:   begin voice_clk = bin_q[2];  voice_next = bin_d[2];  end
    endcase
  end

  assign data_rise  = ~bin_q[0] &  bin_d[0];
  assign data_fall  =  bin_q[0] & ~bin_d[0];
  assign voice_rise = ~voice_clk &  voice_next;
  assign voice_fall =  voice_clk & ~voice_next;

endmodule
