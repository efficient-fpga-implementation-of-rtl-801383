// pipeline_adder_tree: pipelined binary adder tree (PAT) over N signed inputs.
//
// Inputs are sign-extended to OUT_W bits and padded with zeros to a power of two;
// each tree level adds pairs with a carry look-ahead adder and registers the sums.
// The total appears on sum ceil(log2 N) enabled clock edges after the inputs (for
// N = 1 the tree is a plain wire). All registers advance only when en = 1, so the
// tree stalls with the rest of the filter. Asynchronous active-low reset clears
// them. One register per level is this design's choice.
module pipeline_adder_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned IN_W  = 20,
  parameter int unsigned OUT_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din [N],
  output logic signed [OUT_W-1:0] sum
);
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned NP = 1 << LV;

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [OUT_W-1:0] v [NP >> l];

    if (l == 0) begin : g_in
      for (genvar i = 0; i < NP; i++) begin : g_node
        if (i < N) begin : g_used
          assign v[i] = OUT_W'(din[i]);
        end else begin : g_pad
          assign v[i] = '0;
        end
      end
    end else begin : g_add
      for (genvar i = 0; i < (NP >> l); i++) begin : g_node
        logic [OUT_W-1:0] s;
        logic             cout_unused;
        cla_adder #(.W(OUT_W)) u_add (
          .a (g_lvl[l-1].v[2*i]), .b (g_lvl[l-1].v[2*i+1]), .cin (1'b0),
          .s (s), .cout (cout_unused)
        );
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)  v[i] <= '0;
          else if (en) v[i] <= signed'(s);
        end
      end
    end
  end

  assign sum = g_lvl[LV].v[0];
endmodule
