// wallace_tree_mult: unsigned Wallace tree multiplier, p = a * b mod 2^PW.
//
// How it works:
//   1. Partial products: bit a[i] & b[j] goes to column i + j (AND gate array).
//      Columns at or above PW are dropped, so the product is taken modulo 2^PW.
//   2. Reduction: in every stage each column is cut into groups of three bits,
//      each fed to a full adder (3:2 counter); a remaining pair goes to a half
//      adder and a single bit passes through. Sums stay in the column, carries
//      move one column left. Stages repeat until no column holds more than two
//      bits. Column heights are data independent, so the tree shape is worked out
//      at elaboration time by the constant function col_height().
//   3. The last two rows are added by the carry look-ahead adder.
//
// Because the product is kept modulo 2^PW, a two's complement multiplicand that is
// sign-extended to PW bits times an unsigned multiplier also gives the right
// two's complement product; the filter uses it that way.
//
// Defaults (5 x 5 bits, product P0..P9) are those of the 5-bit Wallace tree
// schematic this design follows. The standard grouping above and the CLA for the
// final addition are this design's choices where the schematic's adder-by-adder
// wiring is not reproduced. Combinational.
module wallace_tree_mult #(
  parameter int unsigned AW = 5,
  parameter int unsigned BW = 5,
  parameter int unsigned PW = AW + BW
) (
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [PW-1:0] p
);

  // Bits in column c of the partial-product array.
  function automatic int pp_height(int c);
    int n = 0;
    for (int i = 0; i < int'(AW); i++)
      if (c - i >= 0 && c - i < int'(BW)) n++;
    return n;
  endfunction

  // Lowest a-index that contributes to column c.
  function automatic int pp_imin(int c);
    return (c - int'(BW) + 1 > 0) ? c - int'(BW) + 1 : 0;
  endfunction

  // Height of column c after s reduction stages (0 outside [0, PW)).
  function automatic int col_height(int s, int c);
    int h [PW];
    int n [PW];
    for (int k = 0; k < int'(PW); k++) h[k] = pp_height(k);
    for (int t = 0; t < s; t++) begin
      for (int k = 0; k < int'(PW); k++) begin
        n[k] = h[k] / 3 + ((h[k] % 3 != 0) ? 1 : 0);
        if (k > 0) n[k] += h[k-1] / 3 + ((h[k-1] % 3 == 2) ? 1 : 0);
      end
      for (int k = 0; k < int'(PW); k++) h[k] = n[k];
    end
    return (c >= 0 && c < int'(PW)) ? h[c] : 0;
  endfunction

  function automatic int max_height(int s);
    int m = 0;
    for (int c = 0; c < int'(PW); c++)
      if (col_height(s, c) > m) m = col_height(s, c);
    return m;
  endfunction

  // Number of reduction stages until every column holds at most two bits.
  function automatic int num_stages();
    int s = 0;
    while (max_height(s) > 2 && s < 64) s++;
    return s;
  endfunction

  function automatic int tallest();
    int m = 2;
    for (int s = 0; s <= num_stages(); s++)
      if (max_height(s) > m) m = max_height(s);
    return m;
  endfunction

  localparam int NS   = num_stages();
  localparam int MAXH = tallest();

  for (genvar s = 0; s <= NS; s++) begin : g_stg
    // col[c][k]: k-th bit of column c after stage s.
    wire [MAXH-1:0] col [PW];

    if (s == 0) begin : g_pp
      for (genvar c = 0; c < PW; c++) begin : g_col
        for (genvar k = 0; k < MAXH; k++) begin : g_bit
          if (k < pp_height(c)) begin : g_and
            assign col[c][k] = a[pp_imin(c) + k] & b[c - pp_imin(c) - k];
          end else begin : g_zero
            assign col[c][k] = 1'b0;
          end
        end
      end
    end else begin : g_red
      // cy[c][k]: k-th carry produced by column c, consumed by column c + 1.
      wire [MAXH-1:0] cy [PW];
      for (genvar c = 0; c < PW; c++) begin : g_col
        localparam int HP   = col_height(s - 1, c);
        localparam int NFA  = HP / 3;
        localparam int NHA  = (HP % 3 == 2) ? 1 : 0;
        localparam int NPS  = (HP % 3 == 1) ? 1 : 0;
        localparam int HL   = col_height(s - 1, c - 1);
        localparam int NCIN = (c > 0) ? HL / 3 + ((HL % 3 == 2) ? 1 : 0) : 0;
        for (genvar k = 0; k < MAXH; k++) begin : g_bit
          if (k < NFA) begin : g_fa
            logic p_unused, g_unused;
            full_adder_pg u_fa (
              .a  (g_stg[s-1].col[c][3*k]),
              .b  (g_stg[s-1].col[c][3*k+1]),
              .c  (g_stg[s-1].col[c][3*k+2]),
              .s  (col[c][k]), .p (p_unused), .g (g_unused), .co (cy[c][k])
            );
          end else if (k == NFA && NHA == 1) begin : g_ha
            assign col[c][k] = g_stg[s-1].col[c][3*NFA] ^ g_stg[s-1].col[c][3*NFA+1];
            assign cy[c][k]  = g_stg[s-1].col[c][3*NFA] & g_stg[s-1].col[c][3*NFA+1];
          end else begin : g_rest
            assign cy[c][k] = 1'b0;
            if (k == NFA + NHA && NPS == 1) begin : g_pass
              assign col[c][k] = g_stg[s-1].col[c][3*NFA];
            end else if (k >= NFA + NHA + NPS && k < NFA + NHA + NPS + NCIN) begin : g_cin
              assign col[c][k] = cy[c-1][k - NFA - NHA - NPS];
            end else begin : g_zero
              assign col[c][k] = 1'b0;
            end
          end
        end
      end
    end
  end

  // Final two rows added by the carry look-ahead adder.
  logic [PW-1:0] row0, row1;
  logic          cout_unused;

  for (genvar c = 0; c < PW; c++) begin : g_rows
    assign row0[c] = g_stg[NS].col[c][0];
    assign row1[c] = g_stg[NS].col[c][1];
  end

  cla_adder #(.W(PW)) u_final (
    .a (row0), .b (row1), .cin (1'b0), .s (p), .cout (cout_unused)
  );
endmodule
