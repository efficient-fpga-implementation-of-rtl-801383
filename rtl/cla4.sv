// cla4: 4-bit carry look-ahead adder.
//
// Four one-bit full adders each give a sum bit and their propagate/generate terms;
// a look-ahead unit computes c1..c3 and c4 from p, g and C0 at once, so no carry
// ripples through the full adders. PG and GG summarise the block for a second
// look-ahead level (used by cla16). Structure as in the usual 4-bit CLA block
// diagram: FA cells on top, the look-ahead bar below. Combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c0,
  output logic [3:0] s,
  output logic       c4,
  output logic       pg,
  output logic       gg
);
  logic [3:0] p, g, co_unused;
  logic [3:0] c;

  assign c[0] = c0;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder_pg u_fa (
      .a (a[i]), .b (b[i]), .c (c[i]),
      .s (s[i]), .p (p[i]), .g (g[i]), .co (co_unused[i])
    );
  end

  cla_lookahead4 u_la (
    .p (p), .g (g), .c0 (c0),
    .c (c[3:1]), .c4 (c4), .pg (pg), .gg (gg)
  );
endmodule
