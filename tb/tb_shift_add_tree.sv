// tb_shift_add_tree: self-checking test of the row-combining tree. Instances with
// Q = 1 (latency 1) and Q = 3 (latency 3); random signed 32-bit rows (kept small
// enough not to overflow), en toggling, output compared LATENCY enabled edges later;
// on cycles with en = 0 the output must hold.
module tb_shift_add_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [31:0] d1 [1];
  logic signed [31:0] d3 [3];
  logic signed [31:0] y1, y3;

  shift_add_tree dut1 (.clk(clk), .rst_n(rst_n), .en(en), .din(d1), .y(y1));
  shift_add_tree #(.Q(3), .W(32)) dut3 (.clk(clk), .rst_n(rst_n), .en(en), .din(d3), .y(y3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h1 [int];
  longint h3 [int];

  logic signed [31:0] y1_prev = '0, y3_prev = '0;

  initial begin
    int ne = 0;
    d1[0] = '0;
    foreach (d3[i]) d3[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint s3;
      s3 = 0;
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      d1[0] = $signed(32'($urandom));
      foreach (d3[k]) begin d3[k] = 32'($signed(28'($urandom))); s3 += d3[k]; end
      if (en) begin h1[ne] = d1[0]; h3[ne] = s3; ne++; end
      @(posedge clk);
      #1;
      // With en = 0 the output register must hold.
      if (!en) begin
        checks++;
        if (y1 !== y1_prev || y3 !== y3_prev) begin
          failures++;
          if (failures < 10) $display("FAIL output changed with en = 0");
        end
      end
      y1_prev = y1;
      y3_prev = y3;
      if (en && ne > 1) begin
        checks++;
        if (longint'(y1) != h1[ne - 1]) begin
          failures++;
          if (failures < 10) $display("FAIL Q=1: %0d want %0d", y1, h1[ne - 1]);
        end
      end
      if (en && ne > 3) begin
        checks++;
        if (longint'(y3) != h3[ne - 3]) begin
          failures++;
          if (failures < 10) $display("FAIL Q=3: %0d want %0d", y3, h3[ne - 3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
