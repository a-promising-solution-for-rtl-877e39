// decision_unit: turns the second-level signals into the comparison result.
//
// The truth table (x = don't care):
//     Q|R|S  T  U  V   result
//       1    x  x  x   MISMATCH   (distance >= 4)
//       0    0  0  x   MATCH      (distance 0 or 1)
//       0    0  1  x   FAULT      (distance 2; V is 0 whenever U is 1)
//       0    1  0  0   FAULT      (distance 2)
//       0    1  0  1   MISMATCH   (distance 3)
//       0    1  1  x   MISMATCH   (distance 4)
// MATCH means the stored tag equals the incoming one, possibly with one corrected bit error;
// FAULT means an uncorrectable error (a machine-check condition); MISMATCH means the tags
// differ. The table is the one given for the (8,4) code and holds for any SEC-DED code.
// Purely combinational; exactly one of match, fault, mismatch is 1.
module decision_unit
  import ecc_cmp_pkg::*;
(
  input  logic        q,
  input  logic        r,
  input  logic        s,
  input  logic        t,
  input  logic        u,
  input  logic        v,
  output cmp_result_e result,
  output logic        match,
  output logic        fault,
  output logic        mismatch
);
  always_comb begin
    if (q | r | s)          result = CMP_MISMATCH;
    else if (!t && !u)      result = CMP_MATCH;
    else if (!t)            result = CMP_FAULT;
    else if (!u && !v)      result = CMP_FAULT;
    else                    result = CMP_MISMATCH;
  end

  assign match    = (result == CMP_MATCH);
  assign fault    = (result == CMP_FAULT);
  assign mismatch = (result == CMP_MISMATCH);
endmodule
