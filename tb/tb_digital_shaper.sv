// tb_digital_shaper: drives the three-section shaper with pulses and noise
// and compares filt_out with a reference model of the cascade (each section
// y = x + c, c <= floor(K*y/2^13) - floor(L*x/2^13), 13-bit wrap-around),
// one clock later. Checks bypass (sel_filt = 0: output = input delayed one
// clock) and the one-clock latency, and that a pole-zero setting shortens
// a long exponential tail.
module tb_digital_shaper;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0, sel_filt;
  logic signed [12:0] filt_in, filt_out;
  logic        [12:0] k1, k2, k3, l1, l2, l3;
  int checks = 0, failures = 0;
  longint ys[3], xs[3];
  longint exp_next;
  // settings applied together with the next sample
  logic        p_sel;
  logic [12:0] p_k1, p_k2, p_k3, p_l1, p_l2, p_l3;

  digital_shaper dut (.clk, .rst_b, .filt_in, .sel_filt, .k1, .k2, .k3,
                      .l1, .l2, .l3, .filt_out);
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

  function automatic longint model(longint x);
    longint kk[3], ll[3], v;
    kk = '{longint'(k1), longint'(k2), longint'(k3)};
    ll = '{longint'(l1), longint'(l2), longint'(l3)};
    v = sel_filt ? x : 0;
    for (int s = 0; s < 3; s++) begin
      // state of section s: c = floor(K*y/2^13) - floor(L*x/2^13) of this sample
      longint y = wrap13(v + ys[s]);
      ys[s] = wrap13(fdiv(kk[s] * y) - fdiv(ll[s] * v));
      xs[s] = v; v = y;
    end
    return sel_filt ? v : x;
  endfunction

  task automatic step(input logic signed [12:0] x);
    @(negedge clk);
    checks++;
    if (longint'(filt_out) != exp_next) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t out=%0d exp=%0d in=%0d", $time, filt_out, exp_next, filt_in);
    end
    filt_in = x; sel_filt = p_sel;
    k1 = p_k1; k2 = p_k2; k3 = p_k3; l1 = p_l1; l2 = p_l2; l3 = p_l3;
    exp_next = model(x);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tail_off, tail_on;
  initial begin
    filt_in = 0; sel_filt = 1; p_sel = 1;
    k1 = 13'd4000; l1 = 13'd7800; k2 = 13'd2000; l2 = 13'd3000; k3 = 13'd1000; l3 = 13'd1500;
    p_k1 = k1; p_l1 = l1; p_k2 = k2; p_l2 = l2; p_k3 = k3; p_l3 = l3;
    ys = '{0, 0, 0}; xs = '{0, 0, 0}; exp_next = 0;
    repeat (3) @(negedge clk);
    rst_b = 1;
    // long exponential tail: x = 1000 * 0.95^i
    tail_on = 0;
    for (int i = 0; i < 60; i++) begin
      step(13'(i == 0 ? 0 : int'(1000.0 * (0.95 ** (i - 1)))));
      if (i > 20 && filt_out > 50) tail_on++;
    end
    // bypass
    p_sel = 0; tail_off = 0;
    for (int i = 0; i < 60; i++) begin
      step(13'(i == 0 ? 0 : int'(1000.0 * (0.95 ** (i - 1)))));
      if (i > 20 && filt_out > 50) tail_off++;
    end
    checks++;
    if (!(tail_on < tail_off)) begin
      failures++; $display("FAIL tail not shortened on=%0d off=%0d", tail_on, tail_off);
    end
    // random coefficients and signals
    p_sel = 1;
    for (int rep = 0; rep < 10; rep++) begin
      p_k1 = 13'($urandom); p_k2 = 13'($urandom); p_k3 = 13'($urandom);
      p_l1 = 13'($urandom); p_l2 = 13'($urandom); p_l3 = 13'($urandom);
      for (int i = 0; i < 50; i++) step(13'($signed(10'($urandom))));
    end
    // latency: a step appears exactly one clock later in bypass
    p_sel = 0;
    step(13'sd777);
    @(posedge clk); #1;
    checks++;
    if (filt_out != 13'sd777) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
