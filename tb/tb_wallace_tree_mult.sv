// tb_wallace_tree_mult: self-checking test of the Wallace tree multiplier.
// Three instances: the default 5 x 5 -> 10 bit array (exhaustive), a 12 x 9 array
// truncated to 16 bits, and the 32 x 5 configuration the filter uses with a
// sign-extended multiplicand (random, compared as signed * unsigned mod 2^32).
module tb_wallace_tree_mult;
  int checks = 0, failures = 0;

  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [11:0] a12;
  logic [8:0]  b9;
  logic [15:0] p16;
  logic [31:0] a32, p32;
  logic [4:0]  b32;

  wallace_tree_mult dut5 (.a(a5), .b(b5), .p(p5));
  wallace_tree_mult #(.AW(12), .BW(9), .PW(16)) dut12 (.a(a12), .b(b9), .p(p16));
  wallace_tree_mult #(.AW(32), .BW(5), .PW(32)) dut32 (.a(a32), .b(b32), .p(p32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      {a5, b5} = 10'(i);
      #1;
      checks++;
      if (p5 !== 10'(a5 * b5)) begin
        failures++;
        if (failures < 10) $display("FAIL 5x5: %0d * %0d = %0d", a5, b5, p5);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      a12 = 12'($urandom); b9 = 9'($urandom);
      if (i == 0) begin a12 = '1; b9 = '1; end
      #1;
      checks++;
      if (p16 !== 16'(32'(a12) * 32'(b9))) begin
        failures++;
        if (failures < 10) $display("FAIL 12x9: %0d * %0d = %0d", a12, b9, p16);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      logic signed [23:0] sa;
      sa  = 24'($urandom);
      b32 = 5'($urandom);
      a32 = 32'(sa);               // sign extension
      #1;
      checks++;
      if ($signed(p32) !== 32'(sa * $signed({1'b0, b32}))) begin
        failures++;
        if (failures < 10) $display("FAIL 32x5: %0d * %0d = %0d", sa, b32, $signed(p32));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
