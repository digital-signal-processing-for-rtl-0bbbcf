// tb_cfd_workloads: the CFD settings for best time resolution at the five
// analog shaping times 25, 50, 100, 250 and 500 ns (a = 4.43, 3.98, 2.86,
// 1.60, 1.27 with first-order integration for the two shortest and
// second-order for the others), each run through a complete channel.
// The pulse is a semi-Gaussian CR-RC^4 shape h(t) = (t/tp)^4 exp(4(1-t/tp))
// with peaking time tp equal to the shaping time, sampled every 25 ns at
// heights 150, 400 and 800 ADC counts on a pedestal of 100 (removed by the
// fixed-pedestal subtraction; BC2 and the shaper off). For each pulse the
// testbench models the pedestal subtraction, the integrator and the CFD
// condition itself and checks:
//   - exactly one trigger per pulse, at the clock the model predicts
//     (6 clocks after the sample that meets the condition: BC1 2, shaper 1,
//     integrator 1, CFD 2);
//   - the amplitude given with the trigger;
//   - the time walk between the 400 and 800 count pulses is at most 1 clock.
module tb_cfd_workloads;
  import gdsp_pkg::*;
  localparam int GAP = 160;          // clocks reserved per pulse
  localparam int THR = 50;
  logic clk = 0, rst_b = 0;
  logic [9:0] din = 10'd100, time_cnt = '0;
  dsp_cfg_t cfg;
  logic [9:0] pulse;
  logic flag, trigg, bsl_frozen;
  logic signed [12:0] bsl_out;
  logic [9:0] sram_rdata;
  int checks = 0, failures = 0;
  int cyc = 0;
  int trig_cyc [$];
  int trig_amp [$];

  dsp_channel dut (.clk, .rst_b, .ma_rst_b(1'b1), .din, .time_cnt, .cfg,
                   .noise_ch(10'd0), .sram_sel(1'b0), .pulse, .flag, .trigg,
                   .bsl_out, .sram_rdata, .bsl_frozen);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    time_cnt <= time_cnt + 1'b1;
  end
  always @(negedge clk) if (rst_b && trigg) begin
    trig_cyc.push_back(cyc);
    trig_amp.push_back(int'(pulse));
  end

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int sample(real tp_ns, int height, int k);
    real t, x;
    t = 25.0 * k / tp_ns;
    if (k <= 0) return 0;
    x = t ** 4 * $exp(4.0 * (1.0 - t));
    return int'(height * x);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tps[5] = '{25.0, 50.0, 100.0, 250.0, 500.0};
    real as_[5] = '{4.43, 3.98, 2.86, 1.60, 1.27};
    int  order[5] = '{1, 1, 2, 2, 2};
    int  heights[3] = '{150, 400, 800};
    cfg = '0;
    cfg.control = 7'b0110000;            // BC1 fixed pedestal, BC2 off
    cfg.fpd = 10'd100;
    cfg.cfd_thrsh = 10'(THR); cfg.cfd_merge = 2'd1;
    cfg.mode = MODE_TRACKER;
    repeat (3) @(negedge clk);
    rst_b = 1;
    for (int w = 0; w < 5; w++) begin
      int acode, lat [3];
      acode = int'(as_[w] * 8.0);
      cfg.cfd_a = 7'(acode);
      cfg.int_taps = (order[w] == 1) ? 2'b01 : 2'b11;
      repeat (10) @(negedge clk);
      for (int h = 0; h < 3; h++) begin
        int v [GAP];
        int y, y1, exp_k, exp_amp, start;
        int hist [4];
        // model: pedestal-free samples -> integrator -> CFD condition
        for (int k = 0; k < GAP; k++) v[k] = sample(tps[w], heights[h], k);
        exp_k = -1; y1 = 0; exp_amp = 0;
        hist = '{0, 0, 0, 0};
        for (int k = 0; k < GAP && exp_k < 0; k++) begin
          hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = v[k];
          if (order[w] == 1) y = (hist[0] + hist[1]) >>> 1;
          else               y = (hist[0] + hist[1] + hist[2] + hist[3]) >>> 2;
          if (y <= (acode * y1) >>> 3 && y > THR) begin exp_k = k; exp_amp = y; end
          y1 = y;
        end
        trig_cyc.delete(); trig_amp.delete();
        @(negedge clk);
        start = cyc;
        for (int k = 0; k < GAP; k++) begin
          din = 10'(100 + v[k]);
          @(negedge clk);
        end
        din = 10'd100;
        expect_(exp_k >= 0, $sformatf("tp=%0.0f h=%0d: model finds no trigger", tps[w], heights[h]));
        expect_(trig_cyc.size() == 1,
                $sformatf("tp=%0.0f h=%0d: %0d triggers", tps[w], heights[h], trig_cyc.size()));
        if (trig_cyc.size() >= 1) begin
          lat[h] = trig_cyc[0] - start;
          expect_(lat[h] == exp_k + 6,
                  $sformatf("tp=%0.0f h=%0d: trigger %0d clocks after start, expected %0d",
                            tps[w], heights[h], lat[h], exp_k + 6));
          expect_(trig_amp[0] == exp_amp,
                  $sformatf("tp=%0.0f h=%0d: amplitude %0d, expected %0d",
                            tps[w], heights[h], trig_amp[0], exp_amp));
        end else lat[h] = -100;
      end
      $display("shaping %0.0f ns, a=%0.3f (code %0d), order %0d: trigger at +%0d/+%0d/+%0d clocks for heights 150/400/800",
               tps[w], acode / 8.0, acode, order[w], lat[0], lat[1], lat[2]);
      expect_(lat[1] - lat[2] <= 1 && lat[2] - lat[1] <= 1,
              $sformatf("tp=%0.0f: time walk %0d clocks", tps[w], lat[1] - lat[2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
