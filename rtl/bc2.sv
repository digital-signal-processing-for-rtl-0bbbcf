// bc2: second baseline correction, a self-calibrating baseline follower.
//
// The Moving Average Unit (MAU) averages recent samples into a baseline that
// is subtracted from the signal: dout = din - bsl, saturated to 13 bits and
// registered (latency one clock); bsl_out is the baseline used.
//
// Double threshold scheme: a sample is outside the limits when
// din - bsl > thrsh_h + noise_ch or bsl - din > thrsh_l + noise_ch. While a
// pulse is seen the MAU pipeline is frozen so pulses do not pull the
// baseline (no undershoot after them). edges[1:0] (0..3) delays the MAU
// input so that this many samples before a pulse are excluded as well;
// edges[5:2] (0..15) keeps the MAU frozen for that many samples after the
// pulse (the postmask counter). With glitch set, an excursion of only one or
// two samples is still kept out of the average but does not start the
// post-pulse hold, so noise spikes cannot hold the baseline frozen.
// thr_override switches the scheme off.
//
// After a reset (rst_b, or ma_rst_b which resets only the MAU and this
// control logic) the latency counter lets the MAU fill for `latency`
// samples, then the flat-beat counter waits for `flat` consecutive samples
// inside the limits before the scheme is armed. Until then the MAU follows
// the signal freely. The features and register names follow the document;
// the split of `edges` and the exact counter behaviour are this design's.
// Synchronous active-low resets.
module bc2
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic                     ma_rst_b,
  input  logic signed [DATA_W-1:0] din,
  input  logic        [5:0]        edges,
  input  logic        [3:0]        flat,
  input  logic                     glitch,
  input  logic        [4:0]        latency,
  input  logic        [9:0]        noise_ch,
  input  logic                     thr_override,
  input  logic        [1:0]        taps_en,
  input  logic        [8:0]        thrsh_h,
  input  logic        [8:0]        thrsh_l,
  output logic signed [DATA_W-1:0] dout,
  output logic signed [DATA_W-1:0] bsl_out,
  output logic                     frozen      // MAU held this clock
);
  localparam logic signed [DATA_W+1:0] DMAX = (DATA_W+2)'(2**(DATA_W-1)-1);
  localparam logic signed [DATA_W+1:0] DMIN = -(DATA_W+2)'(2**(DATA_W-1));

  logic                     mrst_b;
  logic signed [DATA_W-1:0] dly [3];
  logic signed [DATA_W-1:0] mau_in, bsl;
  logic signed [DATA_W+1:0] diff;
  logic        [10:0]       th_h, th_l;
  logic                     oot, freeze, scheme_on;
  logic        [1:0]        runlen;             // current excursion length, saturating
  logic        [1:0]        run_now;
  logic        [4:0]        hold_len;
  logic        [4:0]        pcnt;
  logic        [4:0]        lcnt;
  logic                     lat_done, flat_ok;
  logic        [3:0]        fcnt;

  assign mrst_b = rst_b & ma_rst_b;

  always_comb begin
    unique case (edges[1:0])
      2'd0: mau_in = din;
      2'd1: mau_in = dly[0];
      2'd2: mau_in = dly[1];
      default: mau_in = dly[2];
    endcase
    th_h  = {2'b00, thrsh_h} + {1'b0, noise_ch};
    th_l  = {2'b00, thrsh_l} + {1'b0, noise_ch};
    diff  = (DATA_W+2)'(din) - (DATA_W+2)'(bsl);
    oot   = (diff > $signed({4'b0, th_h})) || (-diff > $signed({4'b0, th_l}));
    run_now  = (runlen == 2'd3) ? 2'd3 : runlen + 2'd1;
    hold_len = 5'(edges[1:0]) +
               ((glitch && run_now < 2'd3) ? 5'd0 : 5'(edges[5:2]));
    scheme_on = !thr_override && lat_done && flat_ok;
    freeze = scheme_on && (oot || pcnt != 5'd0);
  end

  mau u_mau (
    .clk, .rst_b(mrst_b), .shift_en(!freeze), .din(mau_in), .taps_en, .bsl
  );

  always_ff @(posedge clk) begin
    if (!mrst_b) begin
      for (int i = 0; i < 3; i++) dly[i] <= '0;
      runlen <= '0;
      pcnt <= '0; lcnt <= '0; fcnt <= '0;
      lat_done <= 1'b0; flat_ok <= 1'b0;
    end else begin
      dly[0] <= din; dly[1] <= dly[0]; dly[2] <= dly[1];
      runlen <= oot ? run_now : 2'd0;
      // postmask counter: covers the pre delay plus the post samples
      if (scheme_on && oot)   pcnt <= hold_len;
      else if (pcnt != 5'd0)  pcnt <= pcnt - 5'd1;
      // latency counter
      if (!lat_done) begin
        if (lcnt >= latency) lat_done <= 1'b1;
        else                 lcnt <= lcnt + 5'd1;
      end
      // flat beat counter
      if (lat_done && !flat_ok) begin
        if (oot)                fcnt <= '0;
        else if (fcnt >= flat)  flat_ok <= 1'b1;
        else                    fcnt <= fcnt + 4'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_b) begin
      dout <= '0; bsl_out <= '0; frozen <= 1'b0;
    end else begin
      if (diff > DMAX)      dout <= DMAX[DATA_W-1:0];
      else if (diff < DMIN) dout <= DMIN[DATA_W-1:0];
      else                  dout <= diff[DATA_W-1:0];
      bsl_out <= bsl;
      frozen  <= freeze;
    end
  end
endmodule
