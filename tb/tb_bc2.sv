// tb_bc2: checks the second baseline correction on a flat baseline of 200
// with rectangular pulses:
//  * every clock, dout = previous din - bsl_out (saturating subtraction);
//  * the baseline settles to exactly 200 and, with the threshold scheme on,
//    stays there through a pulse; with the scheme off the pulse pulls it up;
//  * a pulse of length L freezes the MAU for L + pre + post clocks;
//  * pre-samples keep two small steps before a pulse out of the average;
//  * with glitch set a two-sample spike is excluded without the post-pulse
//    hold, a long pulse gets the full hold;
//  * after a MAU-only reset, nothing freezes before the latency and
//    flat-beat counts have elapsed;
//  * 24000 clocks of random pulses, spikes, drifting baseline, extreme
//    values and random settings (including MAU-only resets) against a
//    clock-by-clock model of the block, comparing dout, bsl_out and frozen
//    every clock.
module tb_bc2;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0, ma_rst_b = 1;
  logic signed [12:0] din, dout, bsl_out;
  logic [5:0] edges;
  logic [3:0] flat;
  logic glitch, thr_override, frozen;
  logic [4:0] latency;
  logic [9:0] noise_ch;
  logic [1:0] taps_en;
  logic [8:0] thrsh_h, thrsh_l;
  int checks = 0, failures = 0;
  int din_prev = 200;
  int frozen_cnt, bsl_min, bsl_max, n201;

  bc2 dut (.clk, .rst_b, .ma_rst_b, .din, .edges, .flat, .glitch, .latency,
           .noise_ch, .thr_override, .taps_en, .thrsh_h, .thrsh_l, .dout,
           .bsl_out, .frozen);
  always #5 clk = ~clk;

  // reference model, updated on the same clock edges as the block
  bit rand_on = 0;
  int mz[8], mdly[3];
  int mrun = 0, mpcnt = 0, mlcnt = 0, mfcnt = 0;
  bit mlat = 0, mflat = 0;
  int e_dout = 0, e_bsl = 0;
  bit e_frz = 0;
  always @(posedge clk) begin
    int x, mi, n, sum, bsl, diff, thh, thl, rn, hl;
    bit oot, son, frz, lat_old;
    x = int'(din);
    mi = (edges[1:0] == 0) ? x : mdly[edges[1:0] - 1];
    n = (taps_en == 2'b00) ? 2 : (taps_en == 2'b11) ? 8 : 4;
    sum = 0;
    for (int i = 0; i < n; i++) sum += mz[i];
    bsl = sum / n;
    if (sum < 0 && bsl * n != sum) bsl--;       // floor division
    diff = x - bsl;
    thh = int'(thrsh_h) + int'(noise_ch);
    thl = int'(thrsh_l) + int'(noise_ch);
    oot = diff > thh || -diff > thl;
    rn = (mrun == 3) ? 3 : mrun + 1;
    hl = int'(edges[1:0]) + ((glitch && rn < 3) ? 0 : int'(edges[5:2]));
    son = !thr_override && mlat && mflat;
    frz = son && (oot || mpcnt != 0);
    if (!rst_b) begin
      e_dout = 0; e_bsl = 0; e_frz = 0;
    end else begin
      e_dout = diff > 4095 ? 4095 : diff < -4096 ? -4096 : diff;
      e_bsl = bsl; e_frz = frz;
    end
    if (!rst_b || !ma_rst_b) begin
      for (int i = 0; i < 8; i++) mz[i] = 0;
      for (int i = 0; i < 3; i++) mdly[i] = 0;
      mrun = 0; mpcnt = 0; mlcnt = 0; mfcnt = 0; mlat = 0; mflat = 0;
    end else begin
      if (!frz) begin
        for (int i = 7; i > 0; i--) mz[i] = mz[i-1];
        mz[0] = mi;
      end
      mdly[2] = mdly[1]; mdly[1] = mdly[0]; mdly[0] = x;
      mrun = oot ? rn : 0;
      if (son && oot) mpcnt = hl;
      else if (mpcnt != 0) mpcnt--;
      lat_old = mlat;
      if (!mlat) begin
        if (mlcnt >= int'(latency)) mlat = 1;
        else mlcnt++;
      end
      if (lat_old && !mflat) begin
        if (oot) mfcnt = 0;
        else if (mfcnt >= int'(flat)) mflat = 1;
        else mfcnt++;
      end
    end
  end
  always @(negedge clk) if (rand_on) begin
    checks++;
    if (int'(dout) != e_dout || int'(bsl_out) != e_bsl || frozen != e_frz) begin
      failures++;
      if (failures < 10) $display("FAIL random: dout %0d bsl %0d frozen %0b, model %0d %0d %0b",
                                  dout, bsl_out, frozen, e_dout, e_bsl, e_frz);
    end
  end

  // drive one sample, check the output identity and gather statistics
  task automatic step(input int x);
    @(negedge clk);
    checks++;
    if (int'(dout) != din_prev - int'(bsl_out)) begin
      failures++;
      if (failures < 10) $display("FAIL dout=%0d din_prev=%0d bsl=%0d", dout, din_prev, bsl_out);
    end
    if (frozen) frozen_cnt++;
    if (int'(bsl_out) < bsl_min) bsl_min = int'(bsl_out);
    if (int'(bsl_out) > bsl_max) bsl_max = int'(bsl_out);
    if (int'(bsl_out) == 201) n201++;
    din = 13'(x); din_prev = x;
  endtask

  task automatic clear_stats();
    frozen_cnt = 0; bsl_min = 100000; bsl_max = -100000; n201 = 0;
  endtask

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(input int len, input int amp);
    for (int i = 0; i < len; i++) step(200 + amp);
  endtask

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 13'sd200; edges = 6'b0000_00; flat = 4'd4; glitch = 0; thr_override = 0;
    latency = 5'd10; noise_ch = 10'd5; taps_en = 2'b11; thrsh_h = 9'd20; thrsh_l = 9'd20;
    repeat (3) @(negedge clk);
    rst_b = 1;
    // settle
    clear_stats();
    for (int i = 0; i < 40; i++) step(200);
    expect_(bsl_out == 13'sd200, "baseline settles to 200");
    // pulse with the scheme on: baseline unchanged, freeze L + pre + post
    edges = {4'd5, 2'd2};
    for (int i = 0; i < 10; i++) step(200);
    clear_stats();
    pulse(6, 400);
    for (int i = 0; i < 30; i++) step(200);
    expect_(bsl_min == 200 && bsl_max == 200, "baseline held through pulse");
    expect_(frozen_cnt == 6 + 2 + 5, $sformatf("freeze length %0d", frozen_cnt));
    // pre-samples: two small steps inside the thresholds just before a pulse
    clear_stats();
    step(210); step(210); pulse(5, 400);
    for (int i = 0; i < 30; i++) step(200);
    expect_(n201 == 0 && bsl_max == 200, "pre-samples excluded with pre=2");
    edges = {4'd5, 2'd0};
    for (int i = 0; i < 10; i++) step(200);
    clear_stats();
    step(210); step(210); pulse(5, 400);
    for (int i = 0; i < 30; i++) step(200);
    expect_(bsl_max > 200, "pre-samples enter the average with pre=0");
    // glitch filter
    glitch = 1; edges = {4'd3, 2'd2};
    for (int i = 0; i < 20; i++) step(200);
    clear_stats();
    pulse(2, 400);
    for (int i = 0; i < 20; i++) step(200);
    expect_(frozen_cnt == 2 + 2 && bsl_max == 200, $sformatf("spike: no post hold with glitch (%0d)", frozen_cnt));
    for (int i = 0; i < 20; i++) step(200);
    clear_stats();
    pulse(8, 400);
    for (int i = 0; i < 20; i++) step(200);
    expect_(frozen_cnt == 8 + 2 + 3, $sformatf("long pulse: full hold with glitch (%0d)", frozen_cnt));
    glitch = 0;
    for (int i = 0; i < 20; i++) step(200);
    // override: the pulse pulls the baseline
    thr_override = 1;
    clear_stats();
    pulse(6, 400);
    for (int i = 0; i < 20; i++) step(200);
    expect_(frozen_cnt == 0 && bsl_max > 250, "override lets the pulse into the baseline");
    thr_override = 0;
    for (int i = 0; i < 20; i++) step(200);
    // MAU reset: scheme disarmed during latency + flat
    @(negedge clk); ma_rst_b = 0;
    @(negedge clk); ma_rst_b = 1; din_prev = int'(din);
    clear_stats();
    for (int i = 0; i < 5; i++) step(200);
    pulse(3, 400);                          // inside the latency window
    expect_(frozen_cnt == 0, "no freeze during latency window");
    for (int i = 0; i < 40; i++) step(200);
    clear_stats();
    pulse(6, 400);
    for (int i = 0; i < 20; i++) step(200);
    expect_(frozen_cnt == 6 + 5, "scheme armed again after latency and flat");
    expect_(bsl_out == 13'sd200, "baseline back at 200");
    // random phase: restart both block and model, then 60 blocks of 400
    @(negedge clk); rst_b = 0;
    @(negedge clk); rst_b = 1;
    rand_on = 1;
    begin
      int base, ph, len, amp;
      base = 200; ph = -1; len = 0; amp = 0;
      for (int blk = 0; blk < 60; blk++) begin
        @(negedge clk);
        edges = 6'($urandom); flat = 4'($urandom); glitch = 1'($urandom);
        latency = 5'($urandom); noise_ch = 10'($urandom_range(0, 40));
        thr_override = ($urandom_range(0, 4) == 0);
        taps_en = 2'($urandom);
        thrsh_h = 9'($urandom_range(5, 120)); thrsh_l = 9'($urandom_range(5, 120));
        if ($urandom_range(0, 2) == 0) ma_rst_b = 0;
        for (int k = 0; k < 400; k++) begin
          int v;
          if (k == 1) ma_rst_b = 1;
          if ($urandom_range(0, 49) == 0) base += int'($urandom_range(0, 60)) - 30;
          if (ph < 0 && $urandom_range(0, 24) == 0) begin
            ph = 0; len = $urandom_range(1, 12);
            amp = int'($urandom_range(0, 800)) - 200;
          end
          v = base + int'($urandom_range(0, 10)) - 5;
          if (ph >= 0) begin
            v += amp;
            ph = (ph + 1 >= len) ? -1 : ph + 1;
          end
          if ($urandom_range(0, 499) == 0) v = ($urandom_range(0, 1) != 0) ? 4095 : -4096;
          din = 13'(v);
          @(negedge clk);
        end
      end
    end
    rand_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
