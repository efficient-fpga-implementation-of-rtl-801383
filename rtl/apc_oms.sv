// apc_oms: APC-OMS product generator for one filter tap.
//
// Produces product = h * addr for the tap's signed coefficient h and an unsigned
// R-bit input digit addr, without a multiplier and with only 2^(R-2) stored words:
//   address generator/controller (apc_oms_encoder) -> odd-multiple RAM
//   (oms_lut_ram) -> shifter (oms_shifter) -> two's complement stage
//   (apc_twos_complement) -> product register.
// For R = 4: addresses 1..8 are odd multiples h, 3h, 5h, 7h shifted left 0..3
// places; 9..15 are 16h minus the product for 16 - addr; 0 gives 0.
//
// Interface: the RAM write port (we, waddr, wdata) is driven by the coefficient
// loader; word j must hold (2j+1)*h. Timing: the product is registered on a clock
// edge with en = 1, so it appears one enabled cycle after addr. Asynchronous
// active-low reset clears the product register. The chain of blocks follows the
// document's APC-OMS block diagram; the output register is this design's choice.
module apc_oms #(
  parameter int unsigned R      = 4,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned LW     = COEF_W + R - 1,  // stored word width
  parameter int unsigned PW     = COEF_W + R,      // product width
  parameter int unsigned WORDS  = 1 << (R - 2),
  parameter int unsigned SH_W   = (R > 2) ? $clog2(R) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [R-1:0]         addr,
  input  logic                 we,
  input  logic [R-3:0]         waddr,
  input  logic [LW-1:0]        wdata,
  output logic signed [PW-1:0] product
);
  logic            zero, cplm;
  logic [R-3:0]    lut_addr;
  logic [SH_W-1:0] shift;
  logic [LW-1:0]   rdata, word0;
  logic [PW-1:0]   shifted, base, result;

  apc_oms_encoder #(.R(R), .SH_W(SH_W)) u_enc (
    .u (addr), .zero (zero), .cplm (cplm), .lut_addr (lut_addr), .shift (shift)
  );

  oms_lut_ram #(.WORDS(WORDS), .W(LW), .AW(R-2)) u_lut (
    .clk (clk), .we (we), .waddr (waddr), .wdata (wdata),
    .raddr (lut_addr), .rdata (rdata), .word0 (word0)
  );

  oms_shifter #(.IN_W(LW), .OUT_W(PW), .SH_W(SH_W)) u_shift (
    .din (rdata), .shift (shift), .dout (shifted)
  );

  // 2^R * h from the stored h (word 0), sign-extended then shifted.
  assign base = PW'(signed'(word0)) << R;

  apc_twos_complement #(.W(PW)) u_cplm (
    .v (shifted), .base (base), .cplm (cplm), .zero (zero), .dout (result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  product <= '0;
    else if (en) product <= signed'(result);
  end
endmodule
