// daq_pkg: types and constants shared by the telemetry acquisition datapath.
//
// Samples and FIR coefficients are 16-bit two's-complement Q1.15 numbers
// (one sign/integer bit, fifteen fraction bits). A shift-and-add product of
// two of them is a 32-bit Q2.30 number, and the sum of the 60 products in
// the FIR filter is carried in 38 bits so that it can never wrap.
//
// DEFAULT_COEFFS holds the filter loaded at reset: a 60-tap equiripple
// (Parks-McClellan) low-pass designed at the decimator output rate fs with
// passband 0 .. 0.205*fs, stopband 0.25*fs .. 0.5*fs and a stopband weight
// of 10, each tap rounded to round(h * 2^15). Its quantised response has
// about 0.16 dB passband ripple and better than 59 dB stopband rejection.
// The 60-tap length, the 0.205 passband factor, the 50 dB goal and the
// 16-bit coefficient format follow the filter specification; the 0.25*fs
// stopband edge is this design's choice, because an edge at 0.5*fs would
// sit on the Nyquist frequency of the filter input. The coefficients can
// be replaced at run time through the FIR filter's write port.
package daq_pkg;

  localparam int unsigned SAMPLE_W = 16;               // Q1.15 sample / coefficient
  localparam int unsigned FRAC_W   = 15;               // fraction bits
  localparam int unsigned PROD_W   = 2 * SAMPLE_W;     // shift-and-add product width
  localparam int unsigned N_TAPS   = 60;               // filter length
  localparam int unsigned DEC_MIN  = 2;                // smallest decimation factor
  localparam int unsigned DEC_MAX  = 1024;             // largest decimation factor
  localparam int unsigned DEC_W    = $clog2(DEC_MAX) + 1; // 11 bits hold 2..1024
  localparam int unsigned DEC_DEFAULT = 32;            // factor selected at reset

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [PROD_W-1:0]   prod_t;
  typedef logic [DEC_W-1:0]           dec_factor_t;

  // Coefficient k multiplies the sample that is k samples old.
  localparam sample_t DEFAULT_COEFFS [N_TAPS] = '{
        33,    103,     73,    -40,    -99,     18,    139,     32,   -174,   -112,
       187,    221,   -158,   -348,     73,    478,     86,   -585,   -331,    639,
       674,   -597,  -1138,    390,   1782,    130,  -2842,  -1536,   5928,  13507,
     13507,   5928,  -1536,  -2842,    130,   1782,    390,  -1138,   -597,    674,
       639,   -331,   -585,     86,    478,     73,   -348,   -158,    221,    187,
      -112,   -174,     32,    139,     18,    -99,    -40,     73,    103,     33
  };

endpackage
