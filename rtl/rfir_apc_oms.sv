// rfir_apc_oms: reconfigurable FIR filter built on APC-OMS product generators.
//
// Computes y(n) = sum_{k=0}^{TAPS-1} h(k) * x(n-k) for an unsigned L-bit input x and
// signed COEF_W-bit coefficients h(k) that can be rewritten while the filter runs.
// No general multiplier touches the data: every product h(k) * digit is read from
// a 4-word RAM of odd multiples of h(k), shifted and, for the upper half of the
// digit range, complemented (anti-symmetric product coding with odd multiple
// storage).
//
// Structure (one row per R-bit input digit, Q = L / R rows):
//   x(n) bits [R*q +: R] -> rfir_group q (shift register, TAPS APC-OMS units,
//   pipelined adder tree, Wallace tree weighting by 2^(R*q))
//   -> shift_add_tree (sums the Q rows, output register) -> y.
//   coef_loader writes h, 3h, 5h, 7h into the RAMs of one tap per request.
//
// Interface and timing:
//   * en = 1 takes x on the clock edge and advances the whole pipeline; with
//     en = 0 everything holds. One output per enabled clock.
//   * The contribution of a sample taken on an enabled edge appears on y after
//     LATENCY = 4 + ceil(log2 TAPS) + ceil(log2 Q) enabled edges (8 at defaults).
//   * coef_we = 1 for one cycle with coef_tap and coef_data starts a load; coef_busy
//     is high for the 4 following cycles, during which the filter is stalled (en is
//     ignored and x is not taken). Outputs whose products were formed before the
//     load use the old coefficient, later ones the new one.
//   * rst_n: asynchronous, active low; clears the pipeline, not the coefficient RAMs.
// The ports clk, en, x(3:0) and y(31:0), the 16 taps, the row/tree/WTM order and the
// carry look-ahead adders follow the document; the reset, the load port, the stall
// during a load and the register placement are this design's choices.
module rfir_apc_oms
  import rfir_pkg::*;
#(
  parameter int unsigned TAPS   = DEF_TAPS,
  parameter int unsigned L      = DEF_L,
  parameter int unsigned R      = DEF_R,
  parameter int unsigned COEF_W = DEF_COEF_W,
  parameter int unsigned Y_W    = DEF_Y_W,
  parameter int unsigned TAP_W  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [L-1:0]             x,
  input  logic                     coef_we,
  input  logic [TAP_W-1:0]         coef_tap,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic                     coef_busy,
  output logic signed [Y_W-1:0]    y
);
  localparam int unsigned Q       = L / R;
  localparam int unsigned LW      = COEF_W + R - 1;
  localparam int unsigned LATENCY = filter_latency(TAPS, Q);

  if (L % R != 0 || R < 3) begin : g_bad_size
    $error("rfir_apc_oms: L must be a multiple of R, and R at least 3");
  end

  logic                  en_dp;
  logic [TAPS-1:0]       lut_we;
  logic [R-3:0]          lut_waddr;
  logic [LW-1:0]         lut_wdata;
  logic signed [Y_W-1:0] row_out [Q];

  coef_loader #(.TAPS(TAPS), .R(R), .COEF_W(COEF_W), .LW(LW), .TAP_W(TAP_W)) u_loader (
    .clk (clk), .rst_n (rst_n), .req (coef_we), .tap (coef_tap), .coef (coef_data),
    .busy (coef_busy), .lut_we (lut_we), .lut_waddr (lut_waddr), .lut_wdata (lut_wdata)
  );

  // The datapath stalls while odd multiples are being rewritten.
  assign en_dp = en & ~coef_busy;

  for (genvar q = 0; q < Q; q++) begin : g_row
    rfir_group #(.TAPS(TAPS), .R(R), .COEF_W(COEF_W), .GROUP(q), .Q(Q), .Y_W(Y_W)) u_row (
      .clk (clk), .rst_n (rst_n), .en (en_dp), .digit (x[R*q +: R]),
      .lut_we (lut_we), .lut_waddr (lut_waddr), .lut_wdata (lut_wdata),
      .wtm_out (row_out[q])
    );
  end

  shift_add_tree #(.Q(Q), .W(Y_W)) u_sat (
    .clk (clk), .rst_n (rst_n), .en (en_dp), .din (row_out), .y (y)
  );
endmodule
