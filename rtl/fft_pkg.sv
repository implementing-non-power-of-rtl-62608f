// fft_pkg: sizes, fixed-point formats and constant functions shared by the
// FFT-1920 prime-factor datapath.
//
// The transform length N = N1 * N2 = 128 * 15 and the 16-bit input samples
// follow the design description; the 24-bit internal and output word is the
// word width of the array the flow was first mapped to. The coefficient format
// (16-bit signed, 14 fractional bits, so that +1.0 and -1.0 are exact) is this
// design's own choice.
//
// Twiddle and DFT coefficients are not stored as tables of numbers: they are
// produced at elaboration time by the constant functions below,
//   cos_q(m, n) = round(2^COEF_FRAC * cos(2*pi*m/n))
//   sin_q(m, n) = round(2^COEF_FRAC * sin(2*pi*m/n))
// The prime-factor index maps are
//   input  (Good's map) : n = (N2*n1 + N1*n2) mod N
//   output (CRT map)    : k = (N2*T2*k1 + N1*T1*k2) mod N,
// with T2 = N2^-1 mod N1 = 111 and T1 = N1^-1 mod N2 = 2.
package fft_pkg;

  localparam int unsigned N1 = 128;          // FFT-128 length (power of two)
  localparam int unsigned N2 = 15;           // FFT-15 length
  localparam int unsigned N  = N1 * N2;      // 1920

  localparam int unsigned T2 = 111;          // 15 * 111 = 1665 = 13*128 + 1
  localparam int unsigned T1 = 2;            // 128 * 2  = 256  = 17*15  + 1

  localparam int unsigned IN_W      = 16;    // input sample component width
  localparam int unsigned DATA_W    = 24;    // RAM / internal / output width
  localparam int unsigned COEF_W    = 16;    // coefficient width
  localparam int unsigned COEF_FRAC = 14;    // coefficient fraction bits

  localparam real PI = 3.14159265358979323846;

  // Engine choices of the two passes. The pairwise FFT-15 and the radix-2
  // FFT-128 are the methods of the tile-processor mapping; the prime-factor
  // FFT-15 (five FFT-3, three FFT-5) and the FFT-128 built from two radix-4
  // FFT-64 and 64 FFT-2 are the methods of the array-processor mapping.
  typedef enum logic {FFT15_PAIRWISE, FFT15_PFA}  fft15_alg_e;
  typedef enum logic {FFT128_RADIX2,  FFT128_R4}  fft128_alg_e;

  function automatic logic signed [COEF_W-1:0] cos_q(input int m, input int n);
    real v;
    v = $cos(2.0 * PI * real'(m) / real'(n)) * real'(1 << COEF_FRAC);
    return COEF_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  function automatic logic signed [COEF_W-1:0] sin_q(input int m, input int n);
    real v;
    v = $sin(2.0 * PI * real'(m) / real'(n)) * real'(1 << COEF_FRAC);
    return COEF_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bitrev(input int unsigned v, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // Output frequency index of FFT-128 bin k1 of the FFT-128 run on column k2.
  function automatic int unsigned pfa_out_index(input int unsigned k1, input int unsigned k2);
    return (N2 * T2 * k1 + N1 * T1 * k2) % N;
  endfunction

  // Input time index of element n2 of the FFT-15 run on row n1.
  function automatic int unsigned pfa_in_index(input int unsigned n1, input int unsigned n2);
    return (N2 * n1 + N1 * n2) % N;
  endfunction

endpackage
