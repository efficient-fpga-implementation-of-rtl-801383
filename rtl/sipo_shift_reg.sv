// sipo_shift_reg: serial-in, parallel-out shift register (the filter's delay line).
//
// On each clock edge with en = 1 the W-bit input enters stage 0 and every stage
// moves one place on; all DEPTH stages are visible at once on taps. taps[k] holds
// the input taken k+1 enabled edges ago, i.e. digit d(n-k) once d(n) is in.
// Asynchronous active-low reset clears all stages (reset value is this design's
// choice).
module sipo_shift_reg #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [DEPTH]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DEPTH); k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int k = 1; k < int'(DEPTH); k++) taps[k] <= taps[k-1];
    end
  end
endmodule
