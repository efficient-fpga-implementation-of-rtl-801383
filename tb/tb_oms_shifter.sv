// tb_oms_shifter: self-checking test of the APC-OMS left shifter. Random signed
// 19-bit inputs, every shift count 0..3; output must equal the sign-extended input
// times 2^shift.
module tb_oms_shifter;
  int checks = 0, failures = 0;
  logic signed [18:0] din;
  logic        [1:0]  shift;
  logic signed [19:0] dout;

  oms_shifter dut (.din(din), .shift(shift), .dout(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      din   = 19'($urandom);
      shift = 2'(i);
      #1;
      checks++;
      if (dout !== 20'(din * (1 << shift))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d << %0d = %0d", din, shift, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
