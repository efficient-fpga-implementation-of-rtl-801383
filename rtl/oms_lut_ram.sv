// oms_lut_ram: the odd-multiple store of one APC-OMS product generator.
//
// WORDS words of W bits; word j holds (2j+1)*h for the tap's coefficient h. It is a
// RAM, not a ROM, so a new coefficient can be loaded while the filter runs. One
// synchronous write port; two asynchronous read ports as in distributed LUT RAM:
// rdata for the word selected by the encoder and word0 (= h), from which the
// 2^R*h term of the anti-symmetric coding is shifted. Contents are not reset and
// must be loaded before use.
module oms_lut_ram #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned W     = 19,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  output logic [W-1:0]  word0
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
  assign word0 = mem[0];
endmodule
