// tb_baseline_correction: checks the bypass options and their latencies:
// both stages bypassed (combinational pass-through), BC1 only with fixed
// pedestal (two clocks), BC2 only (one clock, baseline settles on the
// input level) and both stages (three clocks), where a pulse on a flat
// input comes out with pedestal and moving-average baseline removed.
// A random phase then runs all four bypass combinations with random input,
// pedestal, moving-average length and pre-sample delay (threshold scheme
// overridden) against a clock-by-clock model of the two stages.
module tb_baseline_correction;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0, ma_rst_b = 1;
  logic [9:0] din, time_cnt, add, fpd, sram_data, noise_ch, sram_rdata;
  logic [6:0] control;
  logic rd, wr, glitch, thr_override, frozen;
  logic [5:0] edges;
  logic [3:0] flat;
  logic [4:0] latency;
  logic [1:0] taps_en;
  logic [8:0] thrsh_b2h, thrsh_b2l;
  logic signed [12:0] dout, bsl_out;
  int checks = 0, failures = 0;
  int outs[$];

  baseline_correction dut (.clk, .rst_b, .ma_rst_b, .din, .time_cnt, .control,
    .add, .fpd, .sram_data, .rd, .wr, .edges, .flat, .glitch, .latency,
    .noise_ch, .thr_override, .taps_en, .thrsh_b2h, .thrsh_b2l, .dout, .bsl_out,
    .sram_rdata, .frozen);
  always #5 clk = ~clk;

  // model: BC1 in fixed-pedestal mode, BC2 with the threshold scheme off
  bit rand_on = 0;
  int m_dd = 0, m_b1 = 0, m_b2 = 0;
  int m_z[8], m_dly[3];
  always @(posedge clk) begin
    int x2, mi, n, sum, bsl;
    if (!rst_b) begin
      m_dd = 0; m_b1 = 0; m_b2 = 0;
      for (int i = 0; i < 8; i++) m_z[i] = 0;
      for (int i = 0; i < 3; i++) m_dly[i] = 0;
    end else begin
      x2 = control[5] ? m_b1 : int'(din);
      mi = (edges[1:0] == 0) ? x2 : m_dly[edges[1:0] - 1];
      n = (taps_en == 2'b00) ? 2 : (taps_en == 2'b11) ? 8 : 4;
      sum = 0;
      for (int i = 0; i < n; i++) sum += m_z[i];
      bsl = (sum - ((sum % n + n) % n)) / n;     // floor division
      m_b2 = x2 - bsl;
      for (int i = 7; i > 0; i--) m_z[i] = m_z[i-1];
      m_z[0] = mi;
      m_dly[2] = m_dly[1]; m_dly[1] = m_dly[0]; m_dly[0] = x2;
      m_b1 = m_dd - int'(fpd);
      m_dd = int'(din);
    end
  end
  always @(negedge clk) if (rand_on) begin
    int e;
    #1;
    e = control[6] ? m_b2 : control[5] ? m_b1 : int'(din);
    expect_(int'(dout) == e, $sformatf("random control=%b: dout %0d, model %0d", control, dout, e));
  end

  task automatic expect_(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // applies samples; records dout sampled just before each next edge
  task automatic play(input int s[$]);
    outs = {};
    foreach (s[i]) begin
      @(negedge clk); din = 10'(s[i]); #1; outs.push_back(int'(dout));
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s[$];
    din = 10'd300; time_cnt = 0; add = 0; fpd = 10'd100; sram_data = 0; noise_ch = 10'd5;
    rd = 0; wr = 0; glitch = 0; thr_override = 0; edges = {4'd4, 2'd1}; flat = 4'd2;
    latency = 5'd9; taps_en = 2'b11; thrsh_b2h = 9'd20; thrsh_b2l = 9'd20;
    control = 7'b0000000;
    repeat (3) @(negedge clk);
    rst_b = 1;
    // both bypassed: zero latency
    s = '{300, 301, 700, 12, 1023};
    play(s);
    foreach (s[i]) expect_(outs[i] == s[i], $sformatf("bypass out %0d", outs[i]));
    // BC1 only: dout = din - fpd two clocks later
    control = 7'b0110000;
    s = '{300, 300, 300, 900, 300, 300, 300};
    play(s);
    expect_(outs[5] == 900 - 100 && outs[4] == 200 && outs[6] == 200, "BC1 latency 2");
    // BC2 only: baseline follows the level, then a pulse appears one clock later
    control = 7'b1000000;
    s = {};
    repeat (60) s.push_back(300);
    s.push_back(800); s.push_back(800); s.push_back(300); s.push_back(300);
    play(s);
    expect_(outs[59] == 0 && bsl_out == 13'sd300, $sformatf("BC2 settles (%0d)", outs[59]));
    expect_(outs[61] == 500 && outs[60] == 0, "BC2 latency 1");
    // both stages: pedestal 100 plus moving average 200, latency 3
    // (the old baseline no longer fits the new level: soft-reset the MAU)
    control = 7'b1110000;
    @(negedge clk); ma_rst_b = 0; @(negedge clk); ma_rst_b = 1;
    s = {};
    repeat (60) s.push_back(300);
    s.push_back(800); s.push_back(800); repeat (20) s.push_back(300);
    play(s);
    expect_(outs[59] == 0, "BC1+BC2 baseline removed");
    expect_(outs[63] == 500 && outs[64] == 500 && outs[62] == 0, "BC1+BC2 latency 3");
    expect_(outs[81] == 0 && bsl_out == 13'sd200, "baseline held through pulse");
    // random phase
    thr_override = 1;
    @(negedge clk); rst_b = 0;
    @(negedge clk); rst_b = 1;
    rand_on = 1;
    for (int blk = 0; blk < 40; blk++) begin
      control = {2'(blk % 4), 5'b10000};
      fpd = 10'($urandom);
      taps_en = 2'($urandom);
      edges = 6'($urandom);
      repeat (300) begin
        @(negedge clk); din = 10'($urandom);
      end
    end
    rand_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
