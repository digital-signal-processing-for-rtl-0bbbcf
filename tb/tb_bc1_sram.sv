// tb_bc1_sram: writes a pattern into every word of the 1024 x 10 memory,
// reads it back (one-clock read latency), checks that rdata holds while re
// is low and that a read and write at the same address returns the old word.
module tb_bc1_sram;
  logic clk = 0, we, re;
  logic [9:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  bc1_sram dut (.clk, .we, .re, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  function automatic logic [9:0] pat(int a);
    return 10'((a * 37 + 11) ^ (a >> 3));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; addr = 10'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); re = 1; addr = 10'(1023 - a);
      @(posedge clk); #1;
      checks++;
      if (rdata != pat(1023 - a)) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d rdata=%h", 1023 - a, rdata);
      end
    end
    // hold while re low
    @(negedge clk); re = 0; addr = 10'd5;
    @(posedge clk); #1;
    checks++;
    if (rdata != pat(0)) begin failures++; $display("FAIL hold"); end
    // read-before-write
    @(negedge clk); re = 1; we = 1; addr = 10'd7; wdata = 10'h3ff;
    @(posedge clk); #1;
    checks++;
    if (rdata != pat(7)) begin failures++; $display("FAIL rbw"); end
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    checks++;
    if (rdata != 10'h3ff) begin failures++; $display("FAIL write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
