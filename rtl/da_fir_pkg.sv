// da_fir_pkg: shared helpers of the multi-bit distributed-arithmetic (DA) FIR filter.
//
// Holds the default filter configuration and the word-level full-adder (3,2) row used
// by the multi-operand compressors. All arithmetic in the tap chain is carried out
// modulo 2**W in carry-save form; a word that fits the signed range of W bits is
// therefore recovered exactly when the sum and carry vectors are finally merged.
package da_fir_pkg;

  // Default configuration: the 2-bits-at-a-time filter of the architecture figure,
  // with 8-bit input samples (one output every WX/P = 4 cycles). The tap count and
  // the coefficient width are this design's choice.
  localparam int unsigned DEF_N_TAPS = 8;
  localparam int unsigned DEF_WX     = 8;
  localparam int unsigned DEF_WC     = 8;
  localparam int unsigned DEF_P      = 2;

  // Number of P-bit digits of a WX-bit sample: ceil(WX/P).
  function automatic int unsigned num_digits(int unsigned wx, int unsigned p);
    return (wx + p - 1) / p;
  endfunction

  // Number of operands left after one compressor level working on n operands:
  // every group of four goes through a (4,2) compressor, a group of three through a
  // full-adder row, one or two left-over operands pass unchanged.
  function automatic int unsigned compress_next(int unsigned n);
    int unsigned rem;
    rem = n % 4;
    return 2 * (n / 4) + ((rem == 3) ? 2 : rem);
  endfunction

  // Number of compressor levels needed to bring n operands down to two.
  function automatic int unsigned compress_levels(int unsigned n);
    int unsigned cnt;
    int unsigned k;
    cnt = 0;
    k   = n;
    while (k > 2) begin
      k   = compress_next(k);
      cnt = cnt + 1;
    end
    return cnt;
  endfunction

endpackage
