// coef_loader: run-time coefficient reconfiguration controller.
//
// A request (req = 1 for one cycle, with tap and coef) loads coefficient h into the
// odd-multiple RAM of that tap. The loader writes word j = (2j+1)*h for
// j = 0 .. WORDS-1, one word per cycle, forming each from the previous one by adding
// 2h with the carry look-ahead adder: h, 3h, 5h, 7h for R = 4. busy is high during
// the WORDS write cycles, which start on the cycle after the request; requests while
// busy are ignored. lut_we is one-hot (one bit per tap) and is shared by all digit
// groups, since every group multiplies by the same coefficients.
// Asynchronous active-low reset returns to idle. The document states only that the
// coefficient store is a reloadable RAM; this loader is this design's own.
module coef_loader
  import rfir_pkg::*;
#(
  parameter int unsigned TAPS   = 16,
  parameter int unsigned R      = 4,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned LW     = COEF_W + R - 1,
  parameter int unsigned TAP_W  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic [TAP_W-1:0]         tap,
  input  logic signed [COEF_W-1:0] coef,
  output logic                     busy,
  output logic [TAPS-1:0]          lut_we,
  output logic [R-3:0]             lut_waddr,
  output logic [LW-1:0]            lut_wdata
);
  localparam int unsigned WORDS = 1 << (R - 2);

  loader_state_t    state;
  logic [TAP_W-1:0] tap_q;
  logic [R-3:0]     idx;
  logic [LW-1:0]    acc;      // current odd multiple
  logic [LW-1:0]    two_h;    // 2h, the step between odd multiples
  logic [LW-1:0]    acc_next;
  logic             cout_unused;

  cla_adder #(.W(LW)) u_step (
    .a (acc), .b (two_h), .cin (1'b0), .s (acc_next), .cout (cout_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= LD_IDLE;
      tap_q <= '0;
      idx   <= '0;
      acc   <= '0;
      two_h <= '0;
    end else begin
      unique case (state)
        LD_IDLE: if (req) begin
          state <= LD_LOAD;
          tap_q <= tap;
          idx   <= '0;
          acc   <= LW'(coef);
          two_h <= LW'(coef) << 1;
        end
        LD_LOAD: begin
          acc <= acc_next;
          idx <= idx + 1'b1;
          if (idx == (R-2)'(WORDS - 1)) state <= LD_IDLE;
        end
        default: state <= LD_IDLE;
      endcase
    end
  end

  assign busy      = (state == LD_LOAD);
  assign lut_waddr = idx;
  assign lut_wdata = acc;

  always_comb begin
    lut_we = '0;
    if (state == LD_LOAD) lut_we[tap_q] = 1'b1;
  end

  // At most one tap's RAM is written at a time.
  a_we_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(lut_we));
  // A request is only taken from idle; one taken from idle always starts a load.
  a_req_starts: assert property (@(posedge clk) disable iff (!rst_n)
                                 (req && !busy) |=> busy);
endmodule
