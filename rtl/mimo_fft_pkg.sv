// Shared constants and helper functions of the multi-stream radix-2^2 FFT.
//
// The defaults describe the configuration of a 4x4 MIMO OFDM receiver:
// a 2048-point transform (2k-OFDM) shared by four antenna streams that are
// interleaved sample by sample. Data and twiddle widths are this design's
// own choice; the transform size and stream count are the architecture's.
package mimo_fft_pkg;

  localparam int unsigned DEF_N_FFT = 2048;  // transform length
  localparam int unsigned DEF_M_R   = 4;     // receive streams sharing the pipeline
  localparam int unsigned DEF_IN_W  = 16;    // input sample width (re and im)
  localparam int unsigned DEF_TW_W  = 16;    // twiddle width, 1.0 = 2**(TW_W-2)

  // Reverse the lowest `bits` bits of `v`.
  function automatic int unsigned bit_reverse(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  // Exponent e of the twiddle W_nk^e that the radix-2^2 decomposition applies
  // at position q (0..nk-1) of a block of nk samples after a BF2I/BF2II pair:
  // q = k1*nk/2 + k2*nk/4 + n3  ->  e = n3*(k1 + 2*k2).
  function automatic int unsigned twiddle_exp(int unsigned q, int unsigned nk);
    int unsigned k1 = (q / (nk / 2)) % 2;
    int unsigned k2 = (q / (nk / 4)) % 2;
    int unsigned n3 = q % (nk / 4);
    return n3 * (k1 + 2 * k2);
  endfunction

endpackage
