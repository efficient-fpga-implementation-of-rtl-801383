// tb_apc_oms_encoder: exhaustive self-checking test of the APC-OMS address
// generator/controller for R = 4 and R = 5. For every input u the controls are
// turned back into a multiple: odd = 2*lut_addr + 1, v = odd << shift, and the
// decoded value (0, v, or 2^R - v when cplm) must equal u; cplm must be set exactly
// for u > 2^(R-1).
module tb_apc_oms_encoder;
  int checks = 0, failures = 0;

  logic [3:0] u4;  logic z4, c4;  logic [1:0] a4;  logic [1:0] s4;
  logic [4:0] u5;  logic z5, c5;  logic [2:0] a5;  logic [2:0] s5;

  apc_oms_encoder dut4 (.u(u4), .zero(z4), .cplm(c4), .lut_addr(a4), .shift(s4));
  apc_oms_encoder #(.R(5)) dut5 (.u(u5), .zero(z5), .cplm(c5), .lut_addr(a5), .shift(s5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, dec;
    for (int u = 0; u < 16; u++) begin
      u4 = 4'(u);
      #1;
      v   = (2 * a4 + 1) << s4;
      dec = z4 ? 0 : (c4 ? 16 - v : v);
      checks++;
      if (dec != u || c4 != (u > 8) || z4 != (u == 0) || (!z4 && v > 8)) begin
        failures++;
        $display("FAIL R=4 u=%0d: zero=%0b cplm=%0b addr=%0d shift=%0d", u, z4, c4, a4, s4);
      end
    end
    for (int u = 0; u < 32; u++) begin
      u5 = 5'(u);
      #1;
      v   = (2 * a5 + 1) << s5;
      dec = z5 ? 0 : (c5 ? 32 - v : v);
      checks++;
      if (dec != u || c5 != (u > 16) || z5 != (u == 0) || (!z5 && v > 16)) begin
        failures++;
        $display("FAIL R=5 u=%0d: zero=%0b cplm=%0b addr=%0d shift=%0d", u, z5, c5, a5, s5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
