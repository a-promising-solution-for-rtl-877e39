// tb_ecc_ref_pkg: reference models for the testbenches of the ECC tag-match datapath.
//
// The SEC-DED reference is written in the classic position form of an extended Hamming
// code: codeword positions 1 .. n-1 hold check bits at the powers of two and data bits, in
// order, at the other positions; a valid word has a zero syndrome (XOR of the positions of
// its ones) and even overall parity. ref_parity solves for the check bits and overall bit
// under that rule, independently of the encoder RTL. Words are at most 64 bits.
package tb_ecc_ref_pkg;

  function automatic int ref_checks(input int k);
    int r;
    r = 0;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  // Parity bits {overall, checks[r-1:0]} of a k-bit data word.
  function automatic logic [63:0] ref_parity(input int k, input logic [63:0] data);
    int r, pos, di;
    int syn;
    logic ov;
    logic [63:0] p;
    r   = ref_checks(k);
    syn = 0;
    ov  = 1'b0;
    di  = 0;
    pos = 1;
    while (di < k) begin
      if ((pos & (pos - 1)) != 0) begin
        if (data[di]) syn = syn ^ pos;
        di++;
      end
      pos++;
    end
    p = '0;
    for (int c = 0; c < r; c++) p[c] = syn[c];
    for (int i = 0; i < k; i++) ov ^= data[i];
    for (int c = 0; c < r; c++) ov ^= p[c];
    p[r] = ov;
    return p;
  endfunction

  function automatic int ref_ones(input logic [63:0] v);
    int c;
    c = 0;
    for (int i = 0; i < 64; i++) c += int'(v[i]);
    return c;
  endfunction

  // 0 = match, 1 = fault, 2 = mismatch for a Hamming distance d (SEC-DED rule).
  function automatic int ref_class(input int d);
    if (d <= 1) return 0;
    if (d == 2) return 1;
    return 2;
  endfunction

endpackage
