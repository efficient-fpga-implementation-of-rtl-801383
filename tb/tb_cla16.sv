// tb_cla16: self-checking test of the 16-bit two-level carry look-ahead adder.
// Corner cases (all-ones carry chains, zero, alternating bits) plus 5000 random
// operand pairs; sum, carry out and block PG/GG are compared with integer
// arithmetic.
module tb_cla16;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        c0, cout, pg, gg;

  cla16 dut (.a(a), .b(b), .c0(c0), .s(s), .cout(cout), .pg(pg), .gg(gg));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_one(logic [15:0] ta, logic [15:0] tb_, logic tc);
    logic [16:0] want;
    a = ta; b = tb_; c0 = tc;
    #1;
    want = 17'(ta) + 17'(tb_) + 17'(tc);
    checks++;
    if ({cout, s} !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %0d = %h, want %h", ta, tb_, tc, {cout, s}, want);
    end
    checks++;
    if (pg !== ((ta ^ tb_) == 16'hFFFF) || gg !== (17'(ta) + 17'(tb_) > 17'hFFFF)) begin
      failures++;
      if (failures < 10) $display("FAIL pg/gg %h %h", ta, tb_);
    end
  endtask

  initial begin
    try_one(16'hFFFF, 16'h0000, 1'b1);
    try_one(16'hFFFF, 16'h0001, 1'b0);
    try_one(16'h0000, 16'h0000, 1'b0);
    try_one(16'hAAAA, 16'h5555, 1'b1);
    try_one(16'h0FFF, 16'h0001, 1'b0);
    try_one(16'hFFFF, 16'hFFFF, 1'b1);
    for (int i = 0; i < 5000; i++)
      try_one(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
