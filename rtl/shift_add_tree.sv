// shift_add_tree: pipelined tree that combines the Q weighted digit rows into y(n).
//
// Each row arrives already multiplied by its digit weight 2^(R*q) (by that row's
// Wallace tree multiplier), so this tree adds the Q words with carry look-ahead
// adders, one register per level, and registers the result as the filter output.
// Latency ceil(log2 Q) + 1 enabled edges. Asynchronous active-low reset clears the
// output register.
module shift_add_tree #(
  parameter int unsigned Q = 1,
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din [Q],
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] total;

  pipeline_adder_tree #(.N(Q), .IN_W(W), .OUT_W(W)) u_tree (
    .clk (clk), .rst_n (rst_n), .en (en), .din (din), .sum (total)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= total;
  end
endmodule
