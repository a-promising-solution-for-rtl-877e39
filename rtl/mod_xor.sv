// mod_xor: two-input exclusive OR built from four NAND gates.
//
// The conventional XOR in AND-OR-NOT form needs five gates (two inverters, two ANDs, one
// OR); this form needs one gate fewer, which is the saving the reduced-gate XOR is meant to
// give. The four-NAND arrangement itself is this design's choice:
//   n1 = ~(a & b), n2 = ~(a & n1), n3 = ~(b & n1), y = ~(n2 & n3).
// Purely combinational; y = a ^ b.
module mod_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic n1, n2, n3;
  assign n1 = ~(a & b);
  assign n2 = ~(a & n1);
  assign n3 = ~(b & n1);
  assign y  = ~(n2 & n3);
endmodule
