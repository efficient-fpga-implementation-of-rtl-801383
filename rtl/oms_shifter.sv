// oms_shifter: left shifter of the APC-OMS product generator.
//
// Turns the fetched odd multiple odd*h into v*h = (odd*h) << shift. The input is
// a signed word, sign-extended to OUT_W bits first. Built as a logarithmic
// (barrel) shifter: stage i shifts by 2^i when shift[i] is set. Combinational.
module oms_shifter #(
  parameter int unsigned IN_W  = 19,
  parameter int unsigned OUT_W = 20,
  parameter int unsigned SH_W  = 2
) (
  input  logic signed [IN_W-1:0]  din,
  input  logic        [SH_W-1:0]  shift,
  output logic signed [OUT_W-1:0] dout
);
  logic signed [OUT_W-1:0] stage [SH_W+1];

  always_comb begin
    stage[0] = OUT_W'(din);   // sign extension: din is signed
    for (int i = 0; i < int'(SH_W); i++)
      stage[i+1] = shift[i] ? (stage[i] <<< (1 << i)) : stage[i];
    dout = stage[SH_W];
  end
endmodule
