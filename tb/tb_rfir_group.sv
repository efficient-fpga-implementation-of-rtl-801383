// tb_rfir_group: self-checking test of one digit row of the filter.
// Instance A: defaults (16 taps, R = 4, row 0 of 1, weight 1).
// Instance B: 4 taps, row 1 of 2, weight 2^4.
// The odd-multiple RAMs are written directly through the row's write bus with
// random coefficients; random digits are applied with en toggling; wtm_out must
// equal weight * sum_k h(k) d(n-k), LATENCY = 3 + log2(TAPS) enabled edges after the
// digit d(n) was taken (7 for A, 5 for B).
module tb_rfir_group;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0]  digit = '0;
  logic [1:0]  waddr = '0;
  logic [18:0] wdata = '0;
  logic [15:0] we_a = '0;
  logic [3:0]  we_b = '0;
  logic signed [31:0] out_a, out_b;

  rfir_group dut_a (.clk(clk), .rst_n(rst_n), .en(en), .digit(digit),
                    .lut_we(we_a), .lut_waddr(waddr), .lut_wdata(wdata), .wtm_out(out_a));
  rfir_group #(.TAPS(4), .GROUP(1), .Q(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .en(en), .digit(digit),
    .lut_we(we_b), .lut_waddr(waddr), .lut_wdata(wdata), .wtm_out(out_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h_a [16];
  int h_b [4];
  int d_hist [int];       // digits by enabled-edge index
  longint exp_a [int];
  longint exp_b [int];

  task automatic write_coef(bit to_b, int k, int h);
    for (int j = 0; j < 4; j++) begin
      @(negedge clk);
      we_a = '0; we_b = '0;
      if (to_b) we_b[k] = 1'b1; else we_a[k] = 1'b1;
      waddr = 2'(j); wdata = 19'((2 * j + 1) * h);
    end
    @(negedge clk);
    we_a = '0; we_b = '0;
  endtask

  initial begin
    int ne = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 16; k++) begin h_a[k] = int'($signed(16'($urandom))); write_coef(0, k, h_a[k]); end
    for (int k = 0; k < 4; k++)  begin h_b[k] = int'($signed(16'($urandom))); write_coef(1, k, h_b[k]); end
    h_a[0] = 32767; write_coef(0, 0, h_a[0]);
    h_b[3] = -32768; write_coef(1, 3, h_b[3]);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0);
      digit = 4'($urandom);
      if (en) begin
        longint sa, sb;
        sa = 0; sb = 0;
        d_hist[ne] = digit;
        for (int k = 0; k < 16; k++) if (ne - k >= 0) sa += longint'(h_a[k]) * d_hist[ne - k];
        for (int k = 0; k < 4; k++)  if (ne - k >= 0) sb += longint'(h_b[k]) * d_hist[ne - k];
        exp_a[ne] = sa;
        exp_b[ne] = sb * 16;
        ne++;
      end
      @(posedge clk);
      #1;
      // After ne enabled edges the output reflects the digit taken at edge ne - LAT.
      if (ne >= 7) begin
        checks++;
        if (longint'(out_a) != exp_a[ne - 7]) begin
          failures++;
          if (failures < 10) $display("FAIL A edge %0d: %0d want %0d", ne, out_a, exp_a[ne - 7]);
        end
      end
      if (ne >= 5) begin
        checks++;
        if (longint'(out_b) != exp_b[ne - 5]) begin
          failures++;
          if (failures < 10) $display("FAIL B edge %0d: %0d want %0d", ne, out_b, exp_b[ne - 5]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
