// cla_adder: W-bit adder built from 16-bit carry look-ahead blocks.
//
// The operands are zero-padded to a multiple of 16 bits and cut into cla16 blocks;
// the carry passes from one 16-bit block to the next. Every adder of the filter
// (adder trees, two's complement stage, odd-multiple loader, Wallace tree final
// addition) is an instance of this module. Chaining the 16-bit blocks by their
// carries, rather than adding a third look-ahead level, is this design's choice.
// Combinational.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = (W + 15) / 16;
  localparam int unsigned WP = 16 * NB;

  logic [WP-1:0] a_p, b_p, s_p;

  assign a_p = WP'(a);
  assign b_p = WP'(b);

  for (genvar i = 0; i < NB; i++) begin : g_blk
    logic cin_i, cout_i, pg_unused, gg_unused;
    if (i == 0) begin : g_first
      assign cin_i = cin;
    end else begin : g_next
      assign cin_i = g_blk[i-1].cout_i;
    end
    cla16 u_cla16 (
      .a (a_p[16*i +: 16]), .b (b_p[16*i +: 16]), .c0 (cin_i),
      .s (s_p[16*i +: 16]), .cout (cout_i), .pg (pg_unused), .gg (gg_unused)
    );
  end

  assign s = s_p[W-1:0];

  // Carry out of bit W-1: the last block's carry when W fills it, else the sum bit
  // just above the operands (the padding bits are zero).
  if (WP == W) begin : g_cout_full
    assign cout = g_blk[NB-1].cout_i;
  end else begin : g_cout_pad
    assign cout = s_p[W];
  end
endmodule
