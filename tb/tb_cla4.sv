// tb_cla4: exhaustive self-checking test of the 4-bit carry look-ahead adder.
// All 512 combinations of a, b and c0; the sum, carry out and the group
// propagate/generate terms are compared with integer arithmetic.
module tb_cla4;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic       c0, c4, pg, gg;

  cla4 dut (.a(a), .b(b), .c0(c0), .s(s), .c4(c4), .pg(pg), .gg(gg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int i = 0; i < 512; i++) begin
      {c0, a, b} = 9'(i);
      #1;
      total = a + b + c0;
      checks++;
      if ({c4, s} !== 5'(total)) begin
        failures++;
        $display("FAIL sum: %0d + %0d + %0d gave %0d", a, b, c0, {c4, s});
      end
      checks++;
      if (pg !== ((a ^ b) == 4'hF) || gg !== (5'(a) + 5'(b) > 5'd15)) begin
        failures++;
        $display("FAIL pg/gg for a=%0d b=%0d: pg=%0b gg=%0b", a, b, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
