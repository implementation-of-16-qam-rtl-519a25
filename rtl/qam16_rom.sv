// qam16_rom -- 16-QAM symbol mapping tables (I and Q waveform look-up).
//
// Each 4-bit 16-QAM symbol owns a pair of tables of N_POINTS unsigned DAC
// samples, one for the I rail and one for the Q rail.  Entry n of the I table
// of a symbol with amplitude class a (fraction of full swing) and phase p
// (in table samples, see alamouti_pkg) is
//
//     I[n] = round( a * (2**DAC_W - 1)/2 * (1 + sin(2*pi*(n + p)/N_POINTS)) )
//
// and the Q table is the same sinusoid 90 degrees behind:
//
//     Q[n] = round( a * (2**DAC_W - 1)/2 * (1 + sin(2*pi*(n + p - N_POINTS/4)/N_POINTS)) )
//
// so symbol "0000" gives I = (25 %, 45 deg), Q = (25 %, 315 deg) and "0001"
// gives I = (75 %, 22.5 deg), Q = (75 %, 292.5 deg), the published examples;
// 100 % swing spans the full 0 .. 65535 DAC range.  The tables are computed
// at elaboration from this formula; the sample-per-symbol count, the DAC width
// and the table pair per symbol follow the published design, the formula's
// offset-binary form is read off the published waveforms.
//
// A sign change of a waveform (the "-I" and "-Q" of the Alamouti code) is a
// 180 degree shift, i.e. reading the same table N_POINTS/2 entries further on;
// the caller does that through the separate I and Q read indices.
//
// Interface: sym selects the symbol, idx_i / idx_q the entry of its I and Q
// table.  Timing: synchronous read, dac_i / dac_q are valid one clock after
// the address (maps to block ROM).
module qam16_rom
  import alamouti_pkg::*;
#(
  parameter int unsigned N_POINTS = alamouti_pkg::SAMPLES_PER_SYMBOL,
  parameter int unsigned DAC_W    = alamouti_pkg::DAC_BITS,
  localparam int unsigned IDX_W   = $clog2(N_POINTS)
) (
  input  logic             clk,
  input  sym_t             sym,
  input  logic [IDX_W-1:0] idx_i,
  input  logic [IDX_W-1:0] idx_q,
  output logic [DAC_W-1:0] dac_i,
  output logic [DAC_W-1:0] dac_q
);

  localparam int unsigned DEPTH = (1 << SYM_W) * N_POINTS;
  localparam real         PI    = 3.14159265358979323846;

  typedef logic [DAC_W-1:0] tab_t [DEPTH];

  // Sample of a sinusoid of amplitude class amp_pct at table position pos.
  function automatic logic [DAC_W-1:0] wave(input int unsigned amp_pct, input int pos);
    real half, v;
    half = real'(amp_pct) / 100.0 * (real'((longint'(1) << DAC_W) - 1) / 2.0);
    v    = half * (1.0 + $sin(2.0 * PI * real'(pos % int'(N_POINTS)) / real'(N_POINTS)));
    return DAC_W'(longint'($floor(v + 0.5)));
  endfunction

  // quad = 0 builds the I tables, quad = 1 the Q tables (90 degrees behind).
  function automatic tab_t build(input bit quad);
    tab_t t;
    for (int s = 0; s < (1 << SYM_W); s++) begin
      for (int n = 0; n < int'(N_POINTS); n++) begin
        int   pos;
        sym_t sv;
        sv  = sym_t'(s);
        pos = n + int'(qam16_phase_steps(sv, N_POINTS));
        if (quad) pos = pos + int'(N_POINTS) - int'(N_POINTS / 4);
        t[s * int'(N_POINTS) + n] = wave(qam16_amp_pct(sv[2], sv[0]), pos);
      end
    end
    return t;
  endfunction

  localparam tab_t I_TAB = build(1'b0);
  localparam tab_t Q_TAB = build(1'b1);

  always_ff @(posedge clk) begin
    dac_i <= I_TAB[{sym, idx_i}];
    dac_q <= Q_TAB[{sym, idx_q}];
  end

  initial begin
    assert (N_POINTS >= 16 && (N_POINTS & (N_POINTS - 1)) == 0)
      else $error("qam16_rom: N_POINTS must be a power of two of at least 16");
  end

endmodule
