// alamouti_pkg -- types and constants shared by the 16-QAM Alamouti encoder.
//
// The encoder takes one 8-bit data word per Alamouti block, splits it into two
// 4-bit 16-QAM symbols (X2 = DATA[7:4] in BUFF1, X1 = DATA[3:0] in BUFF0) and
// sends each symbol to the DACs as a waveform of SAMPLES_PER_SYMBOL unsigned samples on
// the I and Q rails.  The word widths (8-bit data, 4-bit symbols, 16-bit DAC
// scale 0..65535) and the 32 points per symbol are the published values.
//
// The 16-QAM constellation is described here by amplitude class and phase:
//   * amplitude 25 %, 75 % or 100 % of full DAC swing (published values);
//   * phase in steps of 360/N_POINTS degrees (one table sample), so a phase
//     shift is an index offset into the table.
// The bit-to-point assignment is this design's own choice, constrained by the
// two published examples "0000" -> (25 %, 45 deg) and "0001" -> (75 %, 22.5 deg):
//   DATA[1] = sign of the in-phase level, DATA[0] = in-phase magnitude (1 or 3),
//   DATA[3] = sign of the quadrature level, DATA[2] = quadrature magnitude.
// That is a Gray-coded rectangular grid; the point's angle atan(q/i) is
// rounded to the nearest multiple of 22.5 degrees as the published example does.
package alamouti_pkg;

  localparam int unsigned DATA_W   = 8;    // data word from the controller
  localparam int unsigned SYM_W    = 4;   // one 16-QAM symbol
  localparam int unsigned DAC_BITS = 16;  // DAC scale, 0 .. 2**16-1
  localparam int unsigned SAMPLES_PER_SYMBOL = 32;  // per time slot

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [SYM_W-1:0]  sym_t;
  typedef logic [DAC_BITS-1:0] dac_t;

  // One complex baseband sample as sent to a DAC card.
  typedef struct packed {
    dac_t i;
    dac_t q;
  } iq_t;

  // Which antenna a TxCORE drives (Table of the Alamouti code):
  //   CH1 / Tx0 : slot 1 X1,  slot 2 -X2*
  //   CH2 / Tx1 : slot 1 X2,  slot 2  X1*
  typedef enum logic {
    CH1 = 1'b0,
    CH2 = 1'b1
  } channel_e;

  // Amplitude class of a 16-QAM point, in percent of full DAC swing.
  // Only the two magnitude bits, DATA[2] and DATA[0], matter.
  function automatic int unsigned qam16_amp_pct(input logic q_mag, input logic i_mag);
    case ({q_mag, i_mag})
      2'b00:   return 25;   // |I| = 1, |Q| = 1
      2'b11:   return 100;  // |I| = 3, |Q| = 3
      default: return 75;   // one level 3, the other 1
    endcase
  endfunction

  // Phase of the I waveform of a 16-QAM point, in table samples
  // (units of 360/n degrees), 0 .. n-1.  n must be a multiple of 16.
  function automatic int unsigned qam16_phase_steps(input sym_t s, input int unsigned n);
    int unsigned p;
    // first-quadrant angle: 45 deg on the diagonal, 22.5 deg when |I| > |Q|,
    // 67.5 deg when |Q| > |I|
    if (s[0] == s[2])   p = n / 8;
    else if (s[0])      p = n / 16;
    else                p = 3 * n / 16;
    // fold into the quadrant given by the two sign bits
    case ({s[3], s[1]})
      2'b00:   return p;                  // +I, +Q
      2'b01:   return n / 2 - p;          // -I, +Q
      2'b11:   return n / 2 + p;          // -I, -Q
      default: return (n - p) % n;        // +I, -Q
    endcase
  endfunction

endpackage
