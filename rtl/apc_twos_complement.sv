// apc_twos_complement: final stage of the APC-OMS product generator.
//
//   dout = 0                          when zero
//        = base + ~v + 1 = base - v   when cplm  (anti-symmetric coding)
//        = v                          otherwise
// with base = 2^R * h. The two's complement of v and the addition of base share one
// carry look-ahead adder: ~v is one operand and the +1 enters as its carry in.
// All values are W-bit two's complement words. Combinational.
module apc_twos_complement #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] v,
  input  logic [W-1:0] base,
  input  logic         cplm,
  input  logic         zero,
  output logic [W-1:0] dout
);
  logic [W-1:0] diff;
  logic         cout_unused;

  cla_adder #(.W(W)) u_add (
    .a (base), .b (~v), .cin (1'b1), .s (diff), .cout (cout_unused)
  );

  always_comb begin
    if (zero)      dout = '0;
    else if (cplm) dout = diff;
    else           dout = v;
  end
endmodule
