// alamouti_tb_pkg -- reference model shared by the encoder testbenches.
//
// The expected DAC samples are worked out from the constellation geometry,
// not from the RTL's tables: a 4-bit symbol is placed on the rectangular
// 16-QAM grid (levels +-1, +-3; DATA[1]/DATA[3] the signs and DATA[0]/DATA[2]
// the magnitudes of the in-phase and quadrature levels), its amplitude class
// comes from the distance to the origin (sqrt2 -> 25 %, sqrt10 -> 75 %,
// sqrt18 -> 100 %) and its phase from atan2 rounded to 22.5 degrees.  Sample
// n of a rail is then a * 32767.5 * (1 + sin(phase + 360*n/N)), the Q rail
// 90 degrees behind the I rail, and a negated rail 180 degrees shifted.
// Comparisons allow one LSB for rounding.
package alamouti_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic real level(input bit sign, input bit mag);
    real v;
    v = mag ? 3.0 : 1.0;
    return sign ? -v : v;
  endfunction

  // Expected sample n (of n_points) of one rail.
  //   quad = 1: Q rail, else I rail;  neg = 1: negated rail.
  function automatic int expected(input logic [3:0] sym, input int n, input int n_points,
                                  input bit quad, input bit neg);
    real li, lq, m2, amp, ang, deg;
    li  = level(sym[1], sym[0]);
    lq  = level(sym[3], sym[2]);
    m2  = li * li + lq * lq;
    amp = (m2 < 5.0) ? 0.25 : ((m2 < 14.0) ? 0.75 : 1.0);
    ang = $atan2(lq, li) * 180.0 / PI;
    ang = 22.5 * $floor(ang / 22.5 + 0.5);
    deg = ang + 360.0 * real'(n) / real'(n_points);
    if (quad) deg = deg - 90.0;
    if (neg)  deg = deg + 180.0;
    return int'($floor(amp * 32767.5 * (1.0 + $sin(deg * PI / 180.0)) + 0.5));
  endfunction

  function automatic bit close(input int got, input int exp);
    return (got - exp <= 1) && (exp - got <= 1);
  endfunction

endpackage
