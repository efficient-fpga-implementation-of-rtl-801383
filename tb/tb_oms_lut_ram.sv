// tb_oms_lut_ram: self-checking test of the odd-multiple RAM. Random writes with
// a reference copy; both asynchronous read ports (selected word and word 0) are
// compared with the reference after every cycle, including cycles without a write.
module tb_oms_lut_ram;
  int checks = 0, failures = 0;
  logic        clk = 1'b0;
  logic        we;
  logic [1:0]  waddr, raddr;
  logic [18:0] wdata, rdata, word0;
  logic [18:0] ref_mem [4];

  oms_lut_ram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                   .raddr(raddr), .rdata(rdata), .word0(word0));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    // Fill every word first so nothing unwritten is read.
    for (int j = 0; j < 4; j++) begin
      @(negedge clk);
      we = 1'b1; waddr = 2'(j); wdata = 19'($urandom); ref_mem[j] = wdata;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 2'($urandom); wdata = 19'($urandom);
      if (we) ref_mem[waddr] = wdata;
      @(posedge clk);
      #1;
      for (int j = 0; j < 4; j++) begin
        raddr = 2'(j);
        #1;
        checks++;
        if (rdata !== ref_mem[j] || word0 !== ref_mem[0]) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d: %h want %h (word0 %h want %h)",
                                      j, rdata, ref_mem[j], word0, ref_mem[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
