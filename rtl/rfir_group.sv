// rfir_group: one digit row of the filter.
//
// Handles digit GROUP of the input, i.e. bits [R*GROUP +: R] of x(n):
//   serial-in parallel-out shift register (TAPS digits deep)
//   -> one APC-OMS product generator per tap, giving h(k) * d(n-k)
//   -> pipelined adder tree summing the TAPS products
//   -> Wallace tree multiplier weighting the row sum by 2^(R*GROUP)
//   -> registered wtm_out.
// The weight replaces a shift-accumulator: the WTM's second operand is the
// constant 2^(R*GROUP), R*(Q-1)+1 bits wide. The row sum is sign-extended to Y_W
// bits before the multiply, and the product is kept modulo 2^Y_W.
//
// Timing: a digit taken on an enabled edge reaches wtm_out 3 + ceil(log2 TAPS)
// enabled edges later (shift register, product register, tree levels, WTM
// register). All registers advance only when en = 1. The order of blocks follows
// the document's block diagram; register placement is this design's choice.
module rfir_group #(
  parameter int unsigned TAPS   = 16,
  parameter int unsigned R      = 4,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned GROUP  = 0,
  parameter int unsigned Q      = 1,
  parameter int unsigned Y_W    = 32,
  parameter int unsigned LW     = COEF_W + R - 1,
  parameter int unsigned PW     = COEF_W + R,
  parameter int unsigned SUM_W  = PW + ((TAPS > 1) ? $clog2(TAPS) : 0)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [R-1:0]          digit,
  input  logic [TAPS-1:0]       lut_we,
  input  logic [R-3:0]          lut_waddr,
  input  logic [LW-1:0]         lut_wdata,
  output logic signed [Y_W-1:0] wtm_out
);
  localparam int unsigned WB_W = R * (Q - 1) + 1;  // weight operand width

  logic [R-1:0]             taps    [TAPS];
  logic signed [PW-1:0]     product [TAPS];
  logic signed [SUM_W-1:0]  row_sum;
  logic [Y_W-1:0]           weighted;

  sipo_shift_reg #(.W(R), .DEPTH(TAPS)) u_sipo (
    .clk (clk), .rst_n (rst_n), .en (en), .din (digit), .taps (taps)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    apc_oms #(.R(R), .COEF_W(COEF_W)) u_apc_oms (
      .clk (clk), .rst_n (rst_n), .en (en), .addr (taps[k]),
      .we (lut_we[k]), .waddr (lut_waddr), .wdata (lut_wdata),
      .product (product[k])
    );
  end

  pipeline_adder_tree #(.N(TAPS), .IN_W(PW), .OUT_W(SUM_W)) u_pat (
    .clk (clk), .rst_n (rst_n), .en (en), .din (product), .sum (row_sum)
  );

  wallace_tree_mult #(.AW(Y_W), .BW(WB_W), .PW(Y_W)) u_wtm (
    .a (Y_W'(row_sum)), .b (WB_W'(1) << (R * GROUP)), .p (weighted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  wtm_out <= '0;
    else if (en) wtm_out <= signed'(weighted);
  end
endmodule
