// tb_apc_oms: self-checking test of one APC-OMS product generator (R = 4,
// 16-bit coefficients). For a set of coefficients, including the most negative
// and most positive values, the odd multiples h, 3h, 5h, 7h are written through the
// RAM port; then every address 0..15 is applied and the registered product must
// equal h * addr one enabled clock later. A cycle with en = 0 must hold the
// product. Counts how often the shift-only path (addr 1..8) and the complement
// path (addr 9..15) were exercised.
module tb_apc_oms;
  int checks = 0, failures = 0;
  int n_shift_path = 0, n_cplm_path = 0;
  logic               clk = 1'b0, rst_n = 1'b0, en = 1'b0, we = 1'b0;
  logic [3:0]         addr = '0;
  logic [1:0]         waddr = '0;
  logic [18:0]        wdata = '0;
  logic signed [19:0] product;

  apc_oms dut (.clk(clk), .rst_n(rst_n), .en(en), .addr(addr),
               .we(we), .waddr(waddr), .wdata(wdata), .product(product));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int h);
    for (int j = 0; j < 4; j++) begin
      @(negedge clk);
      we = 1'b1; waddr = 2'(j); wdata = 19'((2 * j + 1) * h);
    end
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic sweep(int h);
    logic signed [19:0] held;
    for (int u = 0; u < 16; u++) begin
      @(negedge clk);
      addr = 4'(u); en = 1'b1;
      @(posedge clk);
      #1;
      checks++;
      if (product !== 20'(h * u)) begin
        failures++;
        if (failures < 10) $display("FAIL h=%0d addr=%0d: %0d want %0d", h, u, product, h * u);
      end
      if (u >= 1 && u <= 8) n_shift_path++;
      if (u > 8) n_cplm_path++;
    end
    // Hold: en = 0 keeps the last product although the address changes.
    @(negedge clk);
    held = product; en = 1'b0; addr = 4'd3;
    @(posedge clk);
    #1;
    checks++;
    if (product !== held) begin
      failures++;
      $display("FAIL hold with en=0");
    end
  endtask

  initial begin
    int coefs [8] = '{1, -1, 32767, -32768, 1234, -4321, 0, 100};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (coefs[i]) begin
      load(coefs[i]);
      sweep(coefs[i]);
    end
    for (int i = 0; i < 40; i++) begin
      int h;
      h = int'($signed(16'($urandom)));
      load(h);
      sweep(h);
    end
    checks++;
    if (n_shift_path == 0 || n_cplm_path == 0) failures++;
    $display("paths exercised: shift=%0d complement=%0d", n_shift_path, n_cplm_path);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
