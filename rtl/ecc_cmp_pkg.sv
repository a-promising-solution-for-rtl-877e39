// ecc_cmp_pkg: types and constant functions shared by the ECC tag-match datapath.
//
// The comparison result is one of three outcomes, as in the decision table of the
// butterfly-weight-accumulator (BWA) comparator:
//   MATCH    - Hamming distance 0 or 1 between retrieved codeword and encoded incoming tag
//              (equal tags; a single stored bit error is tolerated),
//   FAULT    - distance 2: an uncorrectable error was detected (raise a machine check),
//   MISMATCH - distance 3 or more: the tags differ.
// The code is a systematic SEC-DED code (extended Hamming, this design's choice of code);
// the functions below give its parity-bit count and the weights of the BWA outputs.
// A codeword is laid out {parity[R-1:0], data[K-1:0]}: data in the low K bits.
package ecc_cmp_pkg;

  typedef enum logic [1:0] {
    CMP_MATCH    = 2'd0,
    CMP_FAULT    = 2'd1,
    CMP_MISMATCH = 2'd2
  } cmp_result_e;

  // Number of Hamming check bits r for k data bits: smallest r with 2^r >= k + r + 1.
  function automatic int unsigned hamming_checks(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((32'd1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // SEC-DED parity width: Hamming check bits plus one overall parity bit.
  // k=18 gives 6 (the (24,18) code), k=4 gives 4 (the (8,4) code).
  function automatic int unsigned secded_parity_bits(input int unsigned k);
    return hamming_checks(k) + 1;
  endfunction

  // Number of ones in a value; a BWA output bit at index j has weight 2**popcount(j).
  function automatic int unsigned popcount(input int unsigned v);
    int unsigned c;
    c = 0;
    for (int b = 0; b < 32; b++) c += (v >> b) & 1;
    return c;
  endfunction

endpackage
