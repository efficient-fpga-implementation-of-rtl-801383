// tb_pipeline_adder_tree: self-checking test of the pipelined adder tree.
// Two instances: the default 16 inputs (latency 4) and 5 inputs padded to 8
// (latency 3). Random signed inputs every cycle with en toggling; the expected sum
// is formed in the testbench and compared with the output exactly LATENCY enabled
// edges later, so both the sum and the pipeline depth are checked.
module tb_pipeline_adder_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;

  logic signed [19:0] din16 [16];
  logic signed [23:0] sum16;
  logic signed [19:0] din5 [5];
  logic signed [22:0] sum5;

  pipeline_adder_tree dut16 (.clk(clk), .rst_n(rst_n), .en(en), .din(din16), .sum(sum16));
  pipeline_adder_tree #(.N(5), .IN_W(20), .OUT_W(23)) dut5 (
    .clk(clk), .rst_n(rst_n), .en(en), .din(din5), .sum(sum5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected sums indexed by enabled-edge count.
  longint hist16 [int];
  longint hist5 [int];

  initial begin
    int ne = 0;
    foreach (din16[i]) din16[i] = '0;
    foreach (din5[i]) din5[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint s16, s5;
      s16 = 0; s5 = 0;
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      foreach (din16[k]) begin din16[k] = 20'($urandom); s16 += din16[k]; end
      foreach (din5[k])  begin din5[k]  = 20'($urandom); s5  += din5[k];  end
      if (en) begin
        hist16[ne] = s16;
        hist5[ne]  = s5;
        ne++;
      end
      @(posedge clk);
      #1;
      if (en && ne > 4) begin
        checks++;
        if (longint'(sum16) != hist16[ne - 4]) begin
          failures++;
          if (failures < 10) $display("FAIL N=16 edge %0d: %0d want %0d", ne, sum16, hist16[ne - 4]);
        end
      end
      if (en && ne > 3) begin
        checks++;
        if (longint'(sum5) != hist5[ne - 3]) begin
          failures++;
          if (failures < 10) $display("FAIL N=5 edge %0d: %0d want %0d", ne, sum5, hist5[ne - 3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
