// mf_pkg: constants, types and helper functions shared by the BOK chirp
// matched filter.
//
// The chirp is the baseband linear-FM pulse used throughout the design:
//   s[n] = exp(j*2*pi*(f0*n + bw/(2*(N-1))*n^2)),  n = 0 .. N-1,
// with f0 = F_START/FS and bw = BW/FS in cycles per sample. With the default
// numbers (N = 1024 points at 61.44 MHz, 1 MHz .. 26 MHz) the pulse lasts
// 16.6667 us and sweeps at 1.5 MHz/us. The down-chirp is not stored
// separately: it is the up-chirp read backwards modulo N,
// s_dn[n] = s_up[(N-n) mod N], which sweeps the same band in the opposite
// direction. Its spectrum is the up-chirp spectrum read backwards modulo N,
// so one table serves both sweep directions in either domain.
//
// The chirp numbers, the 12-bit sample format and the 1024-point transform
// follow the original design; the table scalings are this design's own choice.
// All tables are built with integer arithmetic (exact rational chirp phase,
// fixed-point sine and cosine), so synthesis tools can evaluate them.
package mf_pkg;

  // Numbers of the original design (chirp and converter parameters).
  localparam int     N_POINTS   = 1024;        // FFT/IFFT length, samples per chirp
  localparam int     SAMPLE_W   = 12;          // input data format
  localparam longint FS_HZ      = 61_440_000;  // sample rate at the SoC input
  localparam longint F_START_HZ = 1_000_000;   // lowest chirp frequency
  localparam longint BW_HZ      = 25_000_000;  // chirp bandwidth

  localparam real PI = 3.14159265358979323846;

  // Fixed-point formats used to build the tables: phases in cycles with
  // PH_FRAC fraction bits, sine and cosine with TRIG_FRAC fraction bits.
  localparam int     PH_FRAC    = 24;
  localparam int     TRIG_FRAC  = 30;
  localparam longint TRIG_ONE   = longint'(1) <<< TRIG_FRAC;
  localparam longint TWO_PI_Q30 = 64'd6746518852;   // round(2*pi * 2^30)

  // One complex 12-bit baseband sample as delivered by the transceiver.
  typedef struct packed {
    logic signed [SAMPLE_W-1:0] i;
    logic signed [SAMPLE_W-1:0] q;
  } iq_sample_t;

  // Phase of sample n of the up-chirp, in cycles modulo 1, with PH_FRAC
  // fraction bits. Exact rational arithmetic:
  //   phi = (f0*n*2*(N-1) + bw*n^2) / (2*fs*(N-1)).
  function automatic longint chirp_phase(input int n, input int npts,
                                         input longint f0_hz, input longint bw_hz,
                                         input longint fs_hz);
    longint num, den, ln;
    ln  = longint'(n);
    num = f0_hz * ln * 2 * (longint'(npts) - 1) + bw_hz * ln * ln;
    den = 2 * fs_hz * (longint'(npts) - 1);
    return ((num % den) <<< PH_FRAC) / den;
  endfunction

  // Cosine and sine of the angle 2*pi*ph (ph in cycles, PH_FRAC fraction
  // bits), with TRIG_FRAC fraction bits. The angle is folded into the first
  // octant and evaluated with the Taylor series up to x^11 (error < 1e-10).
  function automatic void sincos(input longint ph, output longint c, output longint s);
    longint r, x, x2, ts, tc, sa, ca, t;
    int     q;
    bit     upper;
    q     = int'((ph >>> (PH_FRAC - 2)) & 3);
    r     = ph & ((longint'(1) <<< (PH_FRAC - 2)) - 1);       // within the quadrant
    upper = (r > (longint'(1) <<< (PH_FRAC - 3)));
    if (upper) r = (longint'(1) <<< (PH_FRAC - 2)) - r;      // fold to [0, 45 deg]
    x  = (r * TWO_PI_Q30) >>> PH_FRAC;
    x2 = (x * x) >>> TRIG_FRAC;
    ts = TRIG_ONE - ((x2 * TRIG_ONE) >>> TRIG_FRAC) / 110;
    ts = TRIG_ONE - ((x2 * ts) >>> TRIG_FRAC) / 72;
    ts = TRIG_ONE - ((x2 * ts) >>> TRIG_FRAC) / 42;
    ts = TRIG_ONE - ((x2 * ts) >>> TRIG_FRAC) / 20;
    ts = TRIG_ONE - ((x2 * ts) >>> TRIG_FRAC) / 6;
    sa = (x * ts) >>> TRIG_FRAC;
    tc = TRIG_ONE - ((x2 * TRIG_ONE) >>> TRIG_FRAC) / 90;
    tc = TRIG_ONE - ((x2 * tc) >>> TRIG_FRAC) / 56;
    tc = TRIG_ONE - ((x2 * tc) >>> TRIG_FRAC) / 30;
    tc = TRIG_ONE - ((x2 * tc) >>> TRIG_FRAC) / 12;
    ca = TRIG_ONE - ((x2 * tc) >>> TRIG_FRAC) / 2;
    if (upper) begin t = sa; sa = ca; ca = t; end
    case (q)
      0:       begin c =  ca; s =  sa; end
      1:       begin c = -sa; s =  ca; end
      2:       begin c = -ca; s = -sa; end
      default: begin c =  sa; s = -ca; end
    endcase
  endfunction

  // Round v / 2^sh to the nearest integer (halves away from zero).
  function automatic longint round_shift(input longint v, input int sh);
    longint h;
    h = longint'(1) <<< (sh - 1);
    return (v >= 0) ? ((v + h) >>> sh) : -((-v + h) >>> sh);
  endfunction

  // Round num / den (den > 0) to the nearest integer (halves away from zero).
  function automatic longint round_div(input longint num, input longint den);
    return (num >= 0) ? (2 * num + den) / (2 * den) : -((-2 * num + den) / (2 * den));
  endfunction

  // Reverse the low 'bits' bits of v.
  function automatic int unsigned bit_reverse(input int unsigned v, input int bits);
    int unsigned r;
    r = 0;
    for (int b = 0; b < bits; b++)
      if (v[b]) r |= (1 << (bits - 1 - b));
    return r;
  endfunction

endpackage
