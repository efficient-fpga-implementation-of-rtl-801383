// tb_sipo_shift_reg: self-checking test of the serial-in parallel-out delay line
// (W = 4, DEPTH = 16). Random digits with en toggling at random; a reference
// queue is shifted only on enabled edges and all 16 taps are compared every cycle.
module tb_sipo_shift_reg;
  int checks = 0, failures = 0, n_hold = 0;
  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0] din = '0;
  logic [3:0] taps [16];
  logic [3:0] ref_q [16];

  sipo_shift_reg dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_q[k]) ref_q[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      din = 4'($urandom);
      if (en) begin
        for (int k = 15; k > 0; k--) ref_q[k] = ref_q[k-1];
        ref_q[0] = din;
      end else n_hold++;
      @(posedge clk);
      #1;
      checks++;
      foreach (ref_q[k])
        if (taps[k] !== ref_q[k]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d tap %0d: %h want %h", i, k, taps[k], ref_q[k]);
          break;
        end
    end
    checks++;
    if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
