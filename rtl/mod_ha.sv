// mod_ha: half adder built from four gates.
//
// A conventional half adder is an AND for the carry plus a five-gate AND-OR-NOT XOR for the
// sum, six gates in all; this one needs two fewer by sharing a NAND between sum and carry
// (the exact gate arrangement is this design's choice):
//   n = ~(a & b), o = a | b, sum = o & n, carry = ~n.
// Purely combinational; {carry, sum} = a + b. It is the processing element of the
// butterfly-formed weight accumulator (bwa).
module mod_ha (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  logic n, o;
  assign n     = ~(a & b);
  assign o     = a | b;
  assign sum   = o & n;
  assign carry = ~n;
endmodule
