// cla_lookahead4: four-group carry look-ahead unit.
//
// From four propagate/generate pairs and a carry in it forms the carries into
// groups 1..3, the carry out, and the group propagate (PG) and generate (GG) terms,
// all in two levels of logic. The same unit serves at bit level inside the 4-bit
// CLA (the "4 bit Carry look-ahead" bar) and at block level in the 16-bit CLA (the
// "Carry" block that returns C1, C2, C3 and Cout to the four 4-bit blocks).
// Combinational.
module cla_lookahead4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [3:1] c,     // carries into positions 1..3
  output logic       c4,    // carry out
  output logic       pg,    // group propagate
  output logic       gg     // group generate
);
  assign c[1] = g[0] | (p[0] & c0);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
  assign pg   = &p;
  assign gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
  assign c4   = gg | (pg & c0);
endmodule
