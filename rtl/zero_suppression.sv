// zero_suppression: flags the samples of a channel worth reading out in
// waveform mode, and delays the data to line up with the flag.
//
// The signed input plus `offset` is clipped to a 10-bit unsigned word; a
// sample is above threshold when that word exceeds thrd + noise_ch. Four
// pipelines then shape the flag, in this order:
//   * sequence mask (glitch filter): runs of at most seq_mask samples above
//     threshold are dropped (seq_mask = 0 keeps every run); it looks up to
//     three samples ahead and keeps a sample once its predecessor was kept;
//   * pre-samples: up to premask (0..3) samples before a flagged run;
//   * post-samples: a counter loaded with postmask (0..7) at the end of a
//     run flags that many samples after it;
//   * flag merger: a gap of one or two unflagged samples between two flagged
//     regions is filled.
// dout is the clipped unsigned data delayed by ZS_LAT = 12 clocks; flag is
// aligned with it. The behaviour and option ranges follow the document's
// text and the register names its pipeline diagrams; the exact gating is
// this design's own, written from the described function. Synchronous active-low reset.
module zero_suppression
  import gdsp_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_b,
  input  logic signed [ZS_IN_W-1:0] din,
  input  logic        [9:0]         offset,
  input  logic        [9:0]         thrd,
  input  logic        [9:0]         noise_ch,
  input  logic        [1:0]         seq_mask,
  input  logic        [2:0]         postmask,
  input  logic        [1:0]         premask,
  output logic        [9:0]         dout,
  output logic                      flag
);
  logic signed [ZS_IN_W+1:0] sum;
  logic        [9:0]         u;
  logic        [10:0]        thr;
  logic                      cmp_r;
  logic                      q3, q2, q1, q0;    // sequence mask pipeline
  logic                      f3, f2, f1, f0;    // pre-sample pipeline
  logic        [2:0]         pstscnt;           // post-sample counter
  logic                      fx;
  logic                      m2, m1, m0;        // flag merger pipeline
  logic                      ahead_ok, pre_hit;
  logic        [9:0]         dly [ZS_LAT];      // data delay line

  always_comb begin
    sum = (ZS_IN_W+2)'(din) + $signed({3'b000, offset});
    if (sum < 0)                                    u = '0;
    else if (sum > $signed((ZS_IN_W+2)'(1023)))     u = '1;
    else                                            u = sum[9:0];
    thr = {1'b0, thrd} + {1'b0, noise_ch};
    unique case (seq_mask)
      2'd0: ahead_ok = 1'b1;
      2'd1: ahead_ok = q2;
      2'd2: ahead_ok = q2 & q3;
      default: ahead_ok = q2 & q3 & cmp_r;
    endcase
    pre_hit = (premask >= 2'd1 && f2) || (premask >= 2'd2 && f3) ||
              (premask == 2'd3 && q0);
    fx = (pstscnt != 3'd0);
  end

  always_ff @(posedge clk) begin
    if (!rst_b) begin
      cmp_r <= 1'b0;
      {q3, q2, q1, q0} <= '0;
      {f3, f2, f1, f0} <= '0;
      {m2, m1, m0} <= '0;
      pstscnt <= '0;
      for (int i = 0; i < ZS_LAT; i++) dly[i] <= '0;
    end else begin
      cmp_r <= ({1'b0, u} > thr);
      // sequence mask
      q3 <= cmp_r;
      q2 <= q3;
      q1 <= q2;
      q0 <= q1 & (q0 | ahead_ok);
      // pre-samples and post-samples
      f3 <= q0;
      f2 <= f3;
      f1 <= f2;
      f0 <= f1 | fx | pre_hit;
      if (f1 && !f2)  pstscnt <= postmask;
      else if (fx)    pstscnt <= pstscnt - 3'd1;
      // flag merger
      m2 <= f0;
      m1 <= m2;
      m0 <= m1 | (m0 & (m2 | f0));
      // data delay
      dly[0] <= u;
      for (int i = 1; i < ZS_LAT; i++) dly[i] <= dly[i-1];
    end
  end

  assign dout = dly[ZS_LAT-1];
  assign flag = m0;
endmodule
