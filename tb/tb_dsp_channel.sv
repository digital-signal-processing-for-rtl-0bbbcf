// tb_dsp_channel: one complete channel on a pedestal of 100 ADC counts with
// +-1 count noise and pulses of random height every 50 samples.
//  * Tracker mode, shaper and integrator off: exactly one trigger per pulse,
//    7 clocks after the 0.7-height sample entered (BC1 2 + BC2 1 + DS 1 +
//    INT 1 + CFD 2); Flag equals trigg and Pulse is zero between triggers.
//  * Tracker mode with shaper and first-order integrator on: still exactly
//    one trigger per pulse.
//  * Waveform mode: one flagged cluster per pulse, whose largest Pulse word
//    is the pulse height (pedestal removed) within the noise.
module tb_dsp_channel;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0, ma_rst_b = 1;
  logic [9:0] din, noise_ch, pulse, sram_rdata;
  logic [9:0] time_cnt = 0;
  dsp_cfg_t cfg;
  logic flag, trigg, bsl_frozen;
  logic signed [12:0] bsl_out;
  int checks = 0, failures = 0;
  int cyc = 0;
  int marks[$], heights[$], trig_cyc[$], clusters = 0, cl_max[$];
  int cur_max = 0;
  bit in_cluster = 0;
  real shape[12] = '{0.1, 0.35, 0.7, 0.95, 1.0, 0.9, 0.7, 0.5, 0.35, 0.2, 0.1, 0.05};

  dsp_channel dut (.clk, .rst_b, .ma_rst_b, .din, .time_cnt, .cfg, .noise_ch,
                   .sram_sel(1'b0), .pulse, .flag, .trigg, .bsl_out, .sram_rdata,
                   .bsl_frozen);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc <= cyc + 1; time_cnt <= time_cnt + 1'b1; end

  // output monitor, sampled between edges
  always @(negedge clk) if (rst_b) begin
    if (cfg.mode == MODE_TRACKER) begin
      if (trigg) trig_cyc.push_back(cyc);
      expect_(flag == trigg && (trigg || pulse == 0),
              $sformatf("tracker outputs flag=%0b trigg=%0b pulse=%0d", flag, trigg, pulse));
    end else begin
      if (flag) begin
        in_cluster = 1;
        if (int'(pulse) > cur_max) cur_max = int'(pulse);
      end else if (in_cluster) begin
        in_cluster = 0; clusters++; cl_max.push_back(cur_max); cur_max = 0;
      end
    end
  end

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sample(input int v);
    @(negedge clk);
    din = 10'(v + $urandom_range(0, 2) - 1);
  endtask

  task automatic pulses(input int n);
    marks = {}; heights = {};
    for (int p = 0; p < n; p++) begin
      int amp;
      amp = $urandom_range(400, 900);
      heights.push_back(amp);
      for (int i = 0; i < 12; i++) begin
        sample(100 + int'(amp * shape[i] + 0.5));
        if (i == 2) marks.push_back(cyc);
      end
      repeat (38) sample(100);
    end
    repeat (20) sample(100);
  endtask

  function automatic dsp_cfg_t base_cfg();
    dsp_cfg_t c = '0;
    c.control = 7'b1110000;           // BC1 fixed pedestal, BC2 on
    c.fpd = 10'd100;
    c.edges = {4'd4, 2'd1}; c.flat = 4'd4; c.latency = 5'd10; c.taps_en = 2'b11;
    c.thrsh_b2h = 9'd20; c.thrsh_b2l = 9'd20;
    c.sel_filt = 1'b0; c.int_taps = 2'b00;
    c.cfd_a = 7'd20; c.cfd_thrsh = 10'd90; c.cfd_merge = 2'd1;
    c.zs_offset = 10'd0; c.zs_thrd = 10'd90; c.zs_seq_mask = 2'd1;
    c.zs_premask = 2'd1; c.zs_postmask = 3'd2;
    c.mode = MODE_TRACKER;
    return c;
  endfunction

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = base_cfg(); din = 10'd100; noise_ch = 10'd10;
    repeat (3) @(negedge clk);
    rst_b = 1;
    repeat (60) sample(100);
    // tracker, exact timing
    trig_cyc = {};
    pulses(12);
    expect_(trig_cyc.size() == marks.size(),
            $sformatf("tracker: %0d triggers for %0d pulses", trig_cyc.size(), marks.size()));
    if (trig_cyc.size() == marks.size())
      foreach (marks[i])
        expect_(trig_cyc[i] == marks[i] + 7,
                $sformatf("trigger %0d at %0d, pulse sample at %0d", i, trig_cyc[i], marks[i]));
    // tracker with shaper and integrator
    cfg.sel_filt = 1'b1;
    cfg.k1 = 13'd2000; cfg.l1 = 13'd2500; cfg.k2 = 13'd1000; cfg.l2 = 13'd1000;
    cfg.k3 = 13'd0; cfg.l3 = 13'd0; cfg.int_taps = 2'b01;
    repeat (30) sample(100);
    trig_cyc = {};
    pulses(12);
    expect_(trig_cyc.size() == marks.size(),
            $sformatf("shaper+integrator: %0d triggers for %0d pulses", trig_cyc.size(), marks.size()));
    // waveform mode
    cfg.sel_filt = 1'b0; cfg.int_taps = 2'b00; cfg.mode = MODE_WAVEFORM;
    repeat (30) sample(100);
    clusters = 0; cl_max = {};
    pulses(12);
    expect_(clusters == marks.size(), $sformatf("waveform: %0d clusters for %0d pulses", clusters, marks.size()));
    if (clusters == marks.size())
      foreach (heights[i])
        expect_(cl_max[i] >= heights[i] - 4 && cl_max[i] <= heights[i] + 4,
                $sformatf("cluster %0d peak %0d, pulse height %0d", i, cl_max[i], heights[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
