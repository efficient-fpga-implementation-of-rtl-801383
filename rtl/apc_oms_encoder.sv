// apc_oms_encoder: address generator and controller of the APC-OMS product generator.
//
// The product generator must deliver u * h for every R-bit input digit u while it
// stores only the 2^(R-2) odd multiples h, 3h, 5h, ... (odd multiple storage, OMS).
// This block decodes u into the controls that make that possible:
//   * zero     : u == 0, the product is 0.
//   * cplm     : anti-symmetric product coding (APC). For u > 2^(R-1) the product is
//                formed as 2^R*h - v*h with v = 2^R - u, so only v in 1..2^(R-1)
//                has to be generated. For u <= 2^(R-1), v = u.
//   * shift    : number of trailing zeros of v (v = odd * 2^shift).
//   * lut_addr : word holding odd*h, i.e. (odd - 1) / 2 = odd >> 1.
// For R = 4 the words are h, 3h, 5h, 7h and the shifts reach 8h; 9h..15h come from
// 16h minus 7h..1h. This follows the document's reduced tables (A..8A and 16A, and
// the four odd multiples with their shift counts); the encoding details are this
// design's. Combinational.
module apc_oms_encoder #(
  parameter int unsigned R    = 4,
  parameter int unsigned SH_W = (R > 2) ? $clog2(R) : 1
) (
  input  logic [R-1:0]    u,
  output logic            zero,
  output logic            cplm,
  output logic [R-3:0]    lut_addr,
  output logic [SH_W-1:0] shift
);
  localparam logic [R-1:0] HALF = R'(1) << (R - 1);

  logic [R-1:0] v;     // magnitude to generate
  logic [R-1:0] odd;   // odd part of v

  always_comb begin
    zero = (u == '0);
    cplm = (u > HALF);
    v    = cplm ? (R'(0) - u) : u;   // 2^R - u modulo 2^R
    // Trailing zeros of v: scan from the top so the lowest set bit wins.
    shift = '0;
    for (int i = int'(R) - 1; i >= 0; i--)
      if (v[i]) shift = SH_W'(i);
    odd      = v >> shift;
    lut_addr = odd[R-2:1];
  end
endmodule
