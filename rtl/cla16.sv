// cla16: 16-bit two-level carry look-ahead adder.
//
// Four cla4 blocks add bits [3:0], [7:4], [11:8] and [15:12]. Each reports its group
// propagate and generate to a second look-ahead ("Carry") unit, which returns the
// block carries C1, C2, C3 and the final Cout directly from C0, so the carry path
// is two look-ahead levels deep instead of a 16-bit ripple. The block-level PG/GG
// are exported so wider adders could add a third level. Combinational.
module cla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        c0,
  output logic [15:0] s,
  output logic        cout,
  output logic        pg,
  output logic        gg
);
  logic [3:0] blk_p, blk_g, blk_c4_unused;
  logic [3:0] blk_c;

  assign blk_c[0] = c0;

  for (genvar i = 0; i < 4; i++) begin : g_blk
    cla4 u_cla4 (
      .a  (a[4*i +: 4]), .b (b[4*i +: 4]), .c0 (blk_c[i]),
      .s  (s[4*i +: 4]), .c4 (blk_c4_unused[i]), .pg (blk_p[i]), .gg (blk_g[i])
    );
  end

  cla_lookahead4 u_carry (
    .p (blk_p), .g (blk_g), .c0 (c0),
    .c (blk_c[3:1]), .c4 (cout), .pg (pg), .gg (gg)
  );
endmodule
