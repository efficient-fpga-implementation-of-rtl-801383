// tb_apc_twos_complement: self-checking test of the final APC stage. Random
// values of v and base with every combination of cplm and zero; the output must be
// 0, base - v or v (modulo 2^20).
module tb_apc_twos_complement;
  int checks = 0, failures = 0;
  logic [19:0] v, base, dout, want;
  logic        cplm, zero;

  apc_twos_complement dut (.v(v), .base(base), .cplm(cplm), .zero(zero), .dout(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      v = 20'($urandom); base = 20'($urandom);
      {zero, cplm} = 2'(i);
      #1;
      want = zero ? 20'd0 : (cplm ? base - v : v);
      checks++;
      if (dout !== want) begin
        failures++;
        if (failures < 10) $display("FAIL v=%h base=%h cplm=%0b zero=%0b: %h want %h",
                                    v, base, cplm, zero, dout, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
