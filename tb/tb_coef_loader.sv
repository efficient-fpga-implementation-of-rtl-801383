// tb_coef_loader: self-checking test of the coefficient reconfiguration
// controller (16 taps, R = 4). For each request the testbench records every RAM
// write and checks: exactly 4 writes, to word 0..3 in order, holding h, 3h, 5h, 7h,
// all to the requested tap only; busy is high for exactly those 4 cycles; a request
// made while busy is ignored.
module tb_coef_loader;
  int checks = 0, failures = 0;
  logic               clk = 1'b0, rst_n = 1'b0, req = 1'b0;
  logic [3:0]         tap = '0;
  logic signed [15:0] coef = '0;
  logic               busy;
  logic [15:0]        lut_we;
  logic [1:0]         lut_waddr;
  logic [18:0]        lut_wdata;

  coef_loader dut (.clk(clk), .rst_n(rst_n), .req(req), .tap(tap), .coef(coef),
                   .busy(busy), .lut_we(lut_we), .lut_waddr(lut_waddr), .lut_wdata(lut_wdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_load(int t, int h, bit poke_while_busy);
    int nwrites, nbusy;
    bit ok;
    @(negedge clk);
    req = 1'b1; tap = 4'(t); coef = 16'(h);
    @(negedge clk);
    req = 1'b0;
    nwrites = 0; nbusy = 0; ok = 1'b1;
    for (int c = 0; c < 8; c++) begin
      // Values seen during this cycle, before the edge.
      if (busy) nbusy++;
      if (lut_we != 0) begin
        if (lut_we != (16'd1 << t)) ok = 1'b0;
        if (lut_waddr != 2'(nwrites)) ok = 1'b0;
        if (lut_wdata != 19'((2 * nwrites + 1) * h)) ok = 1'b0;
        nwrites++;
      end
      if (poke_while_busy && c == 1) begin
        req = 1'b1; tap = 4'((t + 1) % 16); coef = 16'(h + 7);
      end else begin
        req = 1'b0;
      end
      @(negedge clk);
    end
    req = 1'b0;
    checks++;
    if (!ok || nwrites != 4 || nbusy != 4) begin
      failures++;
      $display("FAIL load tap=%0d h=%0d: writes=%0d busy=%0d ok=%0b", t, h, nwrites, nbusy, ok);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after reset"); end
    one_load(0, 1, 1'b0);
    one_load(15, -32768, 1'b0);
    one_load(7, 32767, 1'b1);
    for (int i = 0; i < 100; i++)
      one_load(int'($urandom_range(15)), int'($signed(16'($urandom))), 1'(i % 3 == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
