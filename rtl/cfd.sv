// cfd: digital Constant Fraction Discriminator, the bunch-crossing
// identifier of the chain.
//
// For two consecutive samples prev (n-1) and cur (n) the slope condition is
// cur <= a*prev, with a an unsigned 4.3 fixed-point number (0 .. 15.875 in
// steps of 0.125); the product is formed by multiplying and shifting the
// three fraction bits away. On a pulse the ratio cur/prev falls from a large
// value at the foot to 1 at the peak, so the condition becomes true at a
// fixed fraction of the rise, independent of pulse height, and stays true on
// the tail. It is ANDed with a threshold flag cur > thrsh + noise_ch. Gaps in
// the combined flag of up to `merge` samples are bridged (hysteresis): the
// merged flag is held for `merge` clocks after the raw flag drops. The
// rising edge of the merged flag gives a one-clock trigger, and amplitude
// carries the current sample, clipped to 0..1023, in that clock and zero
// otherwise.
//
// Timing: the sample pair (n-1, n) whose sample n enters din at clock t
// produces trigg and amplitude at clock t+2 (CFD_LAT). Slope relation,
// threshold, hysteresis and clipping follow the document; the hold-counter
// form of gap merging and the choice of the current sample as amplitude are
// this design's. Synchronous active-low reset.
module cfd
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic signed [DATA_W-1:0] din,
  input  logic        [CFD_A_W-1:0] a,        // 4.3 fixed point
  input  logic        [9:0]        thrsh,
  input  logic        [9:0]        noise_ch,
  input  logic        [1:0]        merge,
  output logic        [AMP_W-1:0]  amplitude,
  output logic                     trigg
);
  logic signed [DATA_W-1:0]         cur, prev;
  logic signed [DATA_W+CFD_A_W:0]   prod;     // a * prev, signed
  logic signed [DATA_W+CFD_A_W-3:0] scaled;   // (a * prev) >> 3
  logic        [10:0]               thr;
  logic                             slope, above, raw, merged, merged_q;
  logic        [1:0]                hold;
  logic        [AMP_W-1:0]          amp_clip;

  always_comb begin
    prod   = $signed({1'b0, a}) * cur_ext(prev);
    scaled = prod[DATA_W+CFD_A_W:3];
    thr    = {1'b0, thrsh} + {1'b0, noise_ch};
    slope  = cur_ext(cur) <= (DATA_W+CFD_A_W+1)'(scaled);
    above  = cur_ext(cur) >  $signed({{(DATA_W-3){1'b0}}, thr});
    raw    = slope && above;
    merged = raw || (hold != 2'd0);
    if (cur < 0)                            amp_clip = '0;
    else if (cur > $signed(DATA_W'(1023)))  amp_clip = '1;
    else                                    amp_clip = cur[AMP_W-1:0];
  end

  function automatic logic signed [DATA_W+CFD_A_W:0] cur_ext(input logic signed [DATA_W-1:0] v);
    return (DATA_W+CFD_A_W+1)'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_b) begin
      cur <= '0; prev <= '0; hold <= '0; merged_q <= 1'b0;
      trigg <= 1'b0; amplitude <= '0;
    end else begin
      cur  <= din;
      prev <= cur;
      if (raw)                hold <= merge;
      else if (hold != 2'd0)  hold <= hold - 2'd1;
      merged_q  <= merged;
      trigg     <= raw && !merged_q;
      amplitude <= (raw && !merged_q) ? amp_clip : '0;
    end
  end
endmodule
