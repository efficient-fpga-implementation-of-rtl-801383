// full_adder_pg: one-bit full adder that also exports its propagate and generate
// terms, as the "1 bit FA" cells of the 4-bit carry look-ahead adder do.
//
//   p  = a ^ b          (propagate)
//   g  = a & b          (generate)
//   s  = p ^ c          (sum)
//   co = g | (p & c)    (carry out, used by the Wallace tree counters)
//
// Purely combinational. Using xor for p (rather than or) is this design's choice;
// it lets the sum reuse p.
module full_adder_pg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic p,
  output logic g,
  output logic co
);
  assign p  = a ^ b;
  assign g  = a & b;
  assign s  = p ^ c;
  assign co = g | (p & c);
endmodule
