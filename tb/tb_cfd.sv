// tb_cfd: the constant fraction discriminator on a fixed pulse shape
// A * {0.1, 0.35, 0.7, 0.95, 1, 0.9, 0.7, 0.5, 0.35, 0.2, 0.1, 0.05} with
// a = 2.5 (20 in 4.3 fixed point) and threshold 100:
//  * exactly one trigger per pulse, two clocks after the sample 0.7*A, for
//    every amplitude (no amplitude walk), and amplitude = round(0.7*A)
//    clipped to 1023 in that clock and 0 otherwise;
//  * a pulse whose peak does not exceed the threshold gives no trigger;
//  * a one-sample dip below threshold inside a pulse gives two triggers
//    with merge = 0 or 1 and one trigger with merge = 2 or 3 (gap of two);
//  * a larger a moves the trigger one sample earlier;
//  * 20000 clocks of random pulses, noise and random settings against a
//    clock-by-clock model of the discriminator (slope test written as
//    8*x[n] <= a*x[n-1], hold counter, rising-edge trigger), comparing
//    trigg and amplitude every clock.
module tb_cfd;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0;
  logic signed [12:0] din;
  logic [6:0] a;
  logic [9:0] thrsh, noise_ch, amplitude;
  logic [1:0] merge;
  logic trigg;
  int checks = 0, failures = 0;
  int cyc = 0;
  int trig_times[$];
  int trig_amps[$];
  real shape[12] = '{0.1, 0.35, 0.7, 0.95, 1.0, 0.9, 0.7, 0.5, 0.35, 0.2, 0.1, 0.05};

  cfd dut (.clk, .rst_b, .din, .a, .thrsh, .noise_ch, .merge, .amplitude, .trigg);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_b) begin
      if (trigg) begin trig_times.push_back(cyc); trig_amps.push_back(int'(amplitude)); end
      else if (amplitude != 0) begin
        failures++; $display("FAIL amplitude %0d without trigger", amplitude);
      end
    end
  end

  // reference model, updated on the same clock edges as the block
  bit rand_on = 0;
  int m_cur = 0, m_prev = 0, m_hold = 0;
  bit m_mq = 0, m_trig = 0;
  int m_amp = 0;
  always @(posedge clk) begin
    bit raw, mrg;
    if (!rst_b) begin
      m_cur = 0; m_prev = 0; m_hold = 0; m_mq = 0; m_trig = 0; m_amp = 0;
    end else begin
      raw = (8 * m_cur <= int'(a) * m_prev) && (m_cur > int'(thrsh) + int'(noise_ch));
      mrg = raw || m_hold != 0;
      m_trig = raw && !m_mq;
      m_amp = !m_trig ? 0 : (m_cur < 0 ? 0 : (m_cur > 1023 ? 1023 : m_cur));
      if (raw) m_hold = int'(merge);
      else if (m_hold != 0) m_hold--;
      m_mq = mrg;
      m_prev = m_cur;
      m_cur = int'(din);
    end
  end
  always @(negedge clk) if (rand_on)
    expect_(trigg == m_trig && int'(amplitude) == m_amp,
            $sformatf("random: trigg %0b amplitude %0d, model %0b %0d", trigg, amplitude, m_trig, m_amp));

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // plays samples; returns the cycle at which sample index `mark` is on din
  task automatic play(input int s[$], input int mark, output int mark_cyc);
    foreach (s[i]) begin
      @(negedge clk);
      din = 13'(s[i]);
      if (i == mark) mark_cyc = cyc;
    end
    repeat (6) begin @(negedge clk); din = 0; end
  endtask

  task automatic run_pulse(input int amp, input int exp_trigs, input int exp_idx);
    int s[$], mc;
    s = '{0, 0, 0};
    foreach (shape[i]) s.push_back(int'(amp * shape[i] + 0.5));
    trig_times = {}; trig_amps = {};
    play(s, exp_idx + 3, mc);
    expect_(trig_times.size() == exp_trigs,
            $sformatf("A=%0d: %0d triggers, expected %0d", amp, trig_times.size(), exp_trigs));
    if (exp_trigs == 1 && trig_times.size() == 1) begin
      int ea = s[exp_idx + 3] > 1023 ? 1023 : s[exp_idx + 3];
      // sample on din during cycle mc is registered at the end of mc,
      // the trigger register one clock later: seen on cycle mc + CFD_LAT
      expect_(trig_times[0] == mc + CFD_LAT,
              $sformatf("A=%0d: trigger at %0d, expected %0d", amp, trig_times[0], mc + CFD_LAT));
      expect_(trig_amps[0] == ea, $sformatf("A=%0d: amplitude %0d, expected %0d", amp, trig_amps[0], ea));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[$], mc;
    din = 0; a = 7'd20; thrsh = 10'd90; noise_ch = 10'd10; merge = 2'd0;
    repeat (3) @(negedge clk);
    rst_b = 1;
    repeat (3) @(negedge clk);
    // amplitude independence: trigger on the 0.7 sample (index 2)
    run_pulse(300, 1, 2);
    run_pulse(600, 1, 2);
    run_pulse(1200, 1, 2);
    run_pulse(2000, 1, 2);
    run_pulse(95, 0, 2);            // peak 95 is not above 100: no trigger
    // larger a (4.0): ratio 3.5 already satisfied, trigger on index 1
    a = 7'd32;
    run_pulse(800, 1, 1);
    a = 7'd20;
    // a gap of two samples in the flag (dip below threshold, then rising)
    for (int m = 0; m < 4; m++) begin
      merge = 2'(m);
      s = '{0, 0, 0, 100, 400, 600, 500, 400, 50, 400, 350, 300, 200, 100, 0, 0};
      trig_times = {};
      play(s, 0, mc);
      expect_(trig_times.size() == (m >= 2 ? 1 : 2),
              $sformatf("merge=%0d: %0d triggers", m, trig_times.size()));
    end
    // random pulses on a noisy baseline, settings changed every 500 clocks
    rand_on = 1;
    for (int blk = 0; blk < 40; blk++) begin
      int ph, amp;
      @(negedge clk);
      a = 7'($urandom_range(4, 127));
      thrsh = 10'($urandom_range(0, 300));
      noise_ch = 10'($urandom_range(0, 30));
      merge = 2'($urandom_range(0, 3));
      ph = -1; amp = 0;
      for (int k = 0; k < 500; k++) begin
        int v;
        if (ph < 0 && $urandom_range(0, 29) == 0) begin ph = 0; amp = $urandom_range(50, 3000); end
        v = int'($urandom_range(0, 40)) - 20;
        if (ph >= 0) begin
          v += int'(amp * shape[ph]);
          ph = (ph == 11) ? -1 : ph + 1;
        end
        din = 13'(v);
        @(negedge clk);
      end
    end
    rand_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
