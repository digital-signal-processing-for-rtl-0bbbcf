// tb_pz_filter: runs the first-order pole-zero section against a reference
// difference equation y[n] = x[n] + floor(K*y[n-1]/2^13) - floor(L*x[n-1]/2^13)
// (13-bit wrap-around), with random and pulse-shaped inputs, checks exact
// pole-zero cancellation (K = L gives y = x) and that the state clears on
// reset.
module tb_pz_filter;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0;
  logic signed [12:0] din, result;
  logic        [12:0] k, l;
  int checks = 0, failures = 0;
  longint ym1, xm1;
  logic [12:0] p_k, p_l;   // coefficients applied with the next sample

  pz_filter dut (.clk, .rst_b, .din, .k, .l, .result);
  always #5 clk = ~clk;

  function automatic longint fdiv(longint num);
    longint q = num / 8192;
    if ((num % 8192 != 0) && (num < 0)) q = q - 1;
    return q;
  endfunction
  function automatic longint wrap13(longint v);
    longint w = v & 64'h1fff;
    return (w >= 4096) ? w - 8192 : w;
  endfunction

  // drive one sample, compare combinational result, then clock
  task automatic step(input logic signed [12:0] x);
    longint exp;
    @(negedge clk);
    din = x; k = p_k; l = p_l;
    #1;
    exp = wrap13(longint'(x) + ym1);
    checks++;
    if (longint'(result) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d result=%0d exp=%0d", x, result, exp);
    end
    ym1 = wrap13(fdiv(longint'(k) * exp) - fdiv(longint'(l) * longint'(x)));  // next state
    xm1 = x;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; k = 13'd7000; l = 13'd3000; p_k = k; p_l = l;
    repeat (3) @(negedge clk);
    rst_b = 1; ym1 = 0; xm1 = 0;
    // exponential-tailed pulses and random small signals
    for (int rep = 0; rep < 20; rep++) begin
      p_k = 13'($urandom_range(8191)); p_l = 13'($urandom_range(8191));
      for (int i = 0; i < 40; i++) step(13'(i < 3 ? 400 * i : 1200 * 7 / (i + 4)));
      for (int i = 0; i < 40; i++) step(13'($signed(11'($urandom))));
    end
    // K = L: exact cancellation
    p_k = 13'd6000; p_l = 13'd6000; k = p_k; l = p_l;
    @(negedge clk); rst_b = 0; @(negedge clk); rst_b = 1; ym1 = 0; xm1 = 0;
    for (int i = 0; i < 50; i++) begin
      logic signed [12:0] x;
      x = 13'($signed(11'($urandom)));
      step(x);
      checks++;
      if (result != x) failures++;
    end
    // reset clears the state: with zero input the output is zero
    @(negedge clk); din = 13'sd1000; @(negedge clk); rst_b = 0; din = 0;
    @(negedge clk); rst_b = 1; #1;
    checks++;
    if (result != 0) begin failures++; $display("FAIL reset state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
