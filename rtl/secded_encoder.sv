// secded_encoder: parity generator ("ECC Gen") of a systematic SEC-DED code.
//
// The codeword is {parity, data}: the K data bits are stored unchanged and R parity bits are
// appended, so a tag can be compared with the data part of a stored codeword directly while
// its parity bits are still being computed. The code is an extended Hamming code (this
// design's choice; any systematic code of minimum distance 4 would serve): data bit i has
// parity-check column 3, 5, 6, 7, 9, ... (the integers >= 3 that are not powers of two),
// check bit c is the XOR of the data bits whose column has bit c set (a constant mask per
// check bit), and the last parity bit is the XOR of all data and check bits, which raises
// the minimum distance from 3 to 4. K = 18 gives the (24,18) code,
// K = 4 the (8,4) code. Purely combinational XOR trees.
module secded_encoder
  import ecc_cmp_pkg::*;
#(
  parameter int unsigned K  = 18,                     // data (tag) bits
  localparam int unsigned RH = hamming_checks(K),     // Hamming check bits
  localparam int unsigned R  = RH + 1                 // parity bits in the codeword
) (
  input  logic [K-1:0] data,
  output logic [R-1:0] parity
);
  // Data bits that check bit c covers: data bit i sits at Hamming position data_pos(i), the
  // i-th integer >= 3 that is not a power of two, and is covered when bit c of it is set.
  function automatic logic [K-1:0] check_mask(input int unsigned c);
    logic [K-1:0] m;
    int unsigned  di;
    m  = '0;
    di = 0;
    for (int unsigned pos = 3; di < K; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        m[di] = 1'((pos >> c) & 1);
        di++;
      end
    end
    return m;
  endfunction

  logic [RH-1:0] chk;
  for (genvar c = 0; c < RH; c++) begin : g_check
    localparam logic [K-1:0] MASK = check_mask(c);
    assign chk[c] = ^(data & MASK);
  end

  assign parity = {(^data) ^ (^chk), chk};
endmodule
