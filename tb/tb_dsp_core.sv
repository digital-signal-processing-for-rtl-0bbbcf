// tb_dsp_core: end-to-end test of the full 128-channel core at its default
// size. Every channel sits on its own pedestal (100 +- 3) with +-1 count
// noise and receives pulses of its own height in bursts every 80 clocks,
// staggered from channel to channel; the same settings as in a real run
// are used (BC1 pedestal + BC2 moving average with thresholds, CFD).
//  1. Tracker mode: each pulse of each channel gives exactly one trigger,
//     7 clocks after its 0.7-height sample, with that sample (within the
//     noise and the baseline error) as amplitude; the BC2 baselines freeze.
//  2. A moving-average-only reset in a quiet gap: triggers continue.
//  3. Waveform mode: one flagged cluster per pulse in every channel, whose
//     largest sample is the pulse height.
//  4. Register access: channel 9's SRAM is written with a flat test pattern
//     holding one pulse at time addresses 500..511 and read back; in test
//     mode that channel then triggers once per 1024-clock turn of the time
//     counter, at time 502 + 7.
// Each mechanism is counted and a mechanism that never happened counts as a
// failure.
module tb_dsp_core;
  import gdsp_pkg::*;
  localparam int NCH = 128;
  localparam int PERIOD = 80;
  logic clk = 0, rst_b = 0, ma_rst_b = 1;
  logic [9:0] din [NCH];
  logic [9:0] noise_ch [NCH];
  logic [9:0] pulse [NCH];
  logic flag [NCH], trigg [NCH], bsl_frozen [NCH];
  logic signed [12:0] bsl_out [NCH];
  logic [6:0] sram_ch;
  logic [9:0] sram_rdata, time_cnt;
  dsp_cfg_t cfg;
  int checks = 0, failures = 0;
  int cyc = 0;
  real shape[12] = '{0.1, 0.35, 0.7, 0.95, 1.0, 0.9, 0.7, 0.5, 0.35, 0.2, 0.1, 0.05};
  int n_pulses [NCH];
  int n_trig [NCH];
  int n_late [NCH];
  int n_clusters [NCH];
  int n_bad_amp [NCH];
  int cl_max [NCH];
  bit in_cl [NCH];
  int ev_trig = 0, ev_freeze = 0, ev_ma_reset = 0, ev_mode_switch = 0;
  int ev_sram_rw = 0, ev_test_trig = 0, ev_cluster = 0;
  int t0 = 0;                 // start of the current stimulus phase
  bit stim_on = 0;

  dsp_core dut (.clk, .rst_b, .ma_rst_b, .din, .cfg, .noise_ch, .sram_ch,
                .pulse, .flag, .trigg, .bsl_out, .bsl_frozen, .sram_rdata, .time_cnt);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // pulse schedule of channel i: bursts every PERIOD clocks, offset i % 20
  function automatic int height(int i);
    return 300 + 4 * i;
  endfunction
  function automatic int level(int i, int t);
    int ph = t % PERIOD - (i % 20);
    int v = 100 + (i % 7) - 3;
    if (t >= 0 && ph >= 0 && ph < 12) v += int'(height(i) * shape[ph] + 0.5);
    return v;
  endfunction

  // stimulus and expected trigger times
  always @(negedge clk) begin
    for (int i = 0; i < NCH; i++) begin
      int t, v;
      t = cyc - t0;
      v = stim_on ? level(i, t) : 100 + (i % 7) - 3;
      din[i] <= 10'(v + $urandom_range(0, 2) - 1);
      if (stim_on && t % PERIOD - (i % 20) == 2) n_pulses[i]++;
    end
  end

  // output monitor
  always @(negedge clk) if (rst_b) begin
    for (int i = 0; i < NCH; i++) begin
      if (bsl_frozen[i]) ev_freeze++;
      if (cfg.mode == MODE_TRACKER && trigg[i]) begin
        n_trig[i]++; ev_trig++;
        // trigger 7 clocks after the 0.7-height sample of this channel
        if (stim_on && ((cyc - t0 - 7) % PERIOD) - (i % 20) != 2) n_late[i]++;
        if (stim_on && !near(int'(pulse[i]), int'(height(i) * shape[2]))) n_bad_amp[i]++;
      end
      if (cfg.mode == MODE_WAVEFORM) begin
        if (flag[i]) begin
          in_cl[i] = 1;
          if (int'(pulse[i]) > cl_max[i]) cl_max[i] = int'(pulse[i]);
        end else if (in_cl[i]) begin
          in_cl[i] = 0; n_clusters[i]++; ev_cluster++;
          if (!near(cl_max[i], height(i))) n_bad_amp[i]++;
          cl_max[i] = 0;
        end
      end
    end
  end

  // a value after baseline removal: within 2 % of the pulse height plus 6
  // counts of noise and baseline error
  function automatic bit near(int got, int want);
    return got >= want - want / 50 - 6 && got <= want + want / 50 + 6;
  endfunction

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear_counts();
    for (int i = 0; i < NCH; i++) begin
      n_pulses[i] = 0; n_trig[i] = 0; n_late[i] = 0; n_clusters[i] = 0; in_cl[i] = 0;
      n_bad_amp[i] = 0; cl_max[i] = 0;
    end
  endtask

  task automatic run_phase(input int bursts);
    @(negedge clk);
    clear_counts();
    t0 = cyc + 1; stim_on = 1;
    repeat (bursts * PERIOD) @(negedge clk);
    stim_on = 0;
    repeat (40) @(negedge clk);
  endtask

  task automatic check_counts(input bit tracker, input string tag);
    int bad = 0;
    for (int i = 0; i < NCH; i++) begin
      if (n_bad_amp[i] != 0) begin
        bad++;
        if (bad < 5) $display("  ch%0d: %0d wrong amplitudes", i, n_bad_amp[i]);
      end else if (tracker) begin
        if (n_trig[i] != n_pulses[i] || n_late[i] != 0) begin
          bad++;
          if (bad < 5) $display("  ch%0d: %0d triggers (%0d mistimed) for %0d pulses",
                                i, n_trig[i], n_late[i], n_pulses[i]);
        end
      end else if (n_clusters[i] != n_pulses[i]) begin
        bad++;
        if (bad < 5) $display("  ch%0d: %0d clusters for %0d pulses", i, n_clusters[i], n_pulses[i]);
      end
    end
    expect_(bad == 0, $sformatf("%s: %0d channels wrong", tag, bad));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.control = 7'b1110000; cfg.fpd = 10'd100;
    cfg.edges = {4'd4, 2'd1}; cfg.flat = 4'd4; cfg.latency = 5'd10; cfg.taps_en = 2'b11;
    cfg.thrsh_b2h = 9'd20; cfg.thrsh_b2l = 9'd20;
    cfg.sel_filt = 1'b0; cfg.int_taps = 2'b00;
    cfg.cfd_a = 7'd20; cfg.cfd_thrsh = 10'd90; cfg.cfd_merge = 2'd1;
    cfg.zs_thrd = 10'd90; cfg.zs_seq_mask = 2'd1; cfg.zs_premask = 2'd1; cfg.zs_postmask = 3'd2;
    cfg.mode = MODE_TRACKER;
    sram_ch = 7'd9;
    for (int i = 0; i < NCH; i++) begin din[i] = 10'd100; noise_ch[i] = 10'(8 + i % 4); end
    repeat (3) @(negedge clk);
    rst_b = 1;
    repeat (80) @(negedge clk);
    // 1. tracker mode
    run_phase(4);
    check_counts(1, "tracker");
    // 2. MAU reset in a quiet gap, then more pulses
    @(negedge clk); ma_rst_b = 0; @(negedge clk); ma_rst_b = 1; ev_ma_reset++;
    repeat (40) @(negedge clk);
    run_phase(3);
    check_counts(1, "after MAU reset");
    // 3. waveform mode
    cfg.mode = MODE_WAVEFORM; ev_mode_switch++;
    repeat (20) @(negedge clk);
    run_phase(3);
    check_counts(0, "waveform");
    cfg.mode = MODE_TRACKER; ev_mode_switch++;
    // 4. register writes of channel 9's SRAM, read-back, test-mode playback
    cfg.control = 7'b0100000;                 // BC1 register access
    for (int a = 0; a < 1024; a++) begin
      int v;
      v = 200;
      if (a >= 500 && a < 512) v += int'(600 * shape[a - 500] + 0.5);
      @(negedge clk); cfg.add = 10'(a); cfg.sram_data = 10'(v); cfg.wr = 1'b1;
    end
    @(negedge clk); cfg.wr = 1'b0;
    for (int a = 496; a < 516; a++) begin
      int v;
      v = 200;
      if (a >= 500 && a < 512) v += int'(600 * shape[a - 500] + 0.5);
      @(negedge clk); cfg.add = 10'(a); cfg.rd = 1'b1;
      @(negedge clk);
      expect_(sram_rdata == 10'(v), $sformatf("SRAM read-back at %0d: %0d", a, sram_rdata));
      ev_sram_rw++;
    end
    cfg.rd = 1'b0;
    cfg.fpd = 10'd200;
    cfg.control = 7'b1110011;                 // test mode: signal from SRAM
    @(negedge clk); ma_rst_b = 0; @(negedge clk); ma_rst_b = 1; ev_ma_reset++;
    repeat (1100) @(negedge clk);             // one turn to settle
    begin
      int n = 0, bad = 0;
      repeat (1024) begin
        @(negedge clk);
        if (trigg[9]) begin
          n++;
          if (time_cnt != 10'(502 + 7)) bad++;
        end
      end
      expect_(n == 1 && bad == 0, $sformatf("test mode: %0d triggers, %0d mistimed", n, bad));
      ev_test_trig += n;
    end
    // coverage of the mechanisms
    expect_(ev_trig > 0, "no trigger seen");
    expect_(ev_freeze > 0, "BC2 baseline never frozen");
    expect_(ev_ma_reset > 0, "no MAU reset");
    expect_(ev_mode_switch > 0, "no mode switch");
    expect_(ev_cluster > 0, "no ZS cluster");
    expect_(ev_sram_rw > 0, "no SRAM access");
    expect_(ev_test_trig > 0, "no test-mode trigger");
    $display("events: triggers=%0d freeze_clocks=%0d ma_resets=%0d mode_switches=%0d clusters=%0d sram_reads=%0d test_triggers=%0d",
             ev_trig, ev_freeze, ev_ma_reset, ev_mode_switch, ev_cluster, ev_sram_rw, ev_test_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
