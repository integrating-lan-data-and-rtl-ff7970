// dvm_pkg - types and constants shared by the data/voice multiplexer (DVM).
//
// The whole system is modelled as sampled logic running on the 20.48 MHz
// master clock of the prototype. At that rate one 1024 kb/s data bit lasts
// 20 master cycles, a 64 kb/s voice bit 320, a 128 kb/s bit 160, a 160 kb/s
// (DCP) bit 128 and a 256 kb/s bit 80. Analog voltages (the three-level line
// signal and the receiver outputs) are carried as signed samples of
// SAMPLE_W bits; the sample width and the nominal levels are this model's
// own choices, the rates and clock divisions are the prototype's.
package dvm_pkg;

  // Voice bit rate, set by the front-panel rate switch.
  typedef enum logic [1:0] {
    VRATE_64  = 2'd0,
    VRATE_128 = 2'd1,
    VRATE_160 = 2'd2,
    VRATE_256 = 2'd3
  } voice_rate_e;

  localparam int unsigned MASTER_HZ = 20_480_000;
  localparam int unsigned DATA_DIV  = 20;        // 20.48 MHz / 1024 kHz

  // Master cycles per voice bit for each rate.
  function automatic int unsigned voice_div(voice_rate_e r);
    case (r)
      VRATE_64:  return 320;
      VRATE_128: return 160;
      VRATE_160: return 128;
      default:   return 80;
    endcase
  endfunction

  // Manchester decoder timer: three quarters of a bit period.
  function automatic int unsigned timer_len(int unsigned bit_cycles);
    return (bit_cycles * 3) / 4;
  endfunction

endpackage
