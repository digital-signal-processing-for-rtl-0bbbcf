// dsp_channel: the complete DSP chain of one detector channel.
//
//   ADC -> Baseline Correction -> Digital Shaper -> Integrator -+-> CFD
//                                                               +-> ZS
//
// Baseline correction, shaper and integrator work the same way in both
// operating modes. In tracker mode Pulse carries the CFD amplitude and Flag
// the CFD trigger; in waveform mode Pulse carries the zero-suppression data
// and Flag marks the samples to keep. trigg is always the CFD trigger (it has
// its own route off chip). The 13-bit chain data are clipped to the 11-bit
// signed input of the zero suppression. Pulse and Flag are meant for the
// trigger-latency memory and the data formatter that follow the core.
//
// Latency from din to trigg with both baseline stages, shaper and
// integrator in: BC 3 + DS 1 + INT 1 + CFD 2 = 7 clocks; to the ZS flag
// 3 + 1 + 1 + 12 = 17 clocks. The block order follows the order in
// which the document describes the chain, with both baseline stages merged
// in front of the shaper; the clipping in front of the zero suppression is
// this design's choice.
module dsp_channel
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic                     ma_rst_b,
  input  logic        [ADC_W-1:0]  din,
  input  logic        [TIME_W-1:0] time_cnt,
  input  dsp_cfg_t                 cfg,
  input  logic        [9:0]        noise_ch,
  input  logic                     sram_sel,   // register access to this channel
  output logic        [AMP_W-1:0]  pulse,
  output logic                     flag,
  output logic                     trigg,
  output logic signed [DATA_W-1:0] bsl_out,
  output logic        [9:0]        sram_rdata,
  output logic                     bsl_frozen
);
  logic signed [DATA_W-1:0]  bc_out, ds_out, int_out;
  logic signed [ZS_IN_W-1:0] zs_in;
  logic        [AMP_W-1:0]   amplitude;
  logic        [9:0]         zs_dout;
  logic                      zs_flag;

  baseline_correction u_bc (
    .clk, .rst_b, .ma_rst_b, .din, .time_cnt,
    .control(cfg.control), .add(cfg.add), .fpd(cfg.fpd),
    .sram_data(cfg.sram_data), .rd(cfg.rd & sram_sel), .wr(cfg.wr & sram_sel),
    .edges(cfg.edges), .flat(cfg.flat), .glitch(cfg.glitch),
    .latency(cfg.latency), .noise_ch, .thr_override(cfg.thr_override),
    .taps_en(cfg.taps_en), .thrsh_b2h(cfg.thrsh_b2h), .thrsh_b2l(cfg.thrsh_b2l),
    .dout(bc_out), .bsl_out, .sram_rdata, .frozen(bsl_frozen)
  );

  digital_shaper u_ds (
    .clk, .rst_b, .filt_in(bc_out), .sel_filt(cfg.sel_filt),
    .k1(cfg.k1), .k2(cfg.k2), .k3(cfg.k3), .l1(cfg.l1), .l2(cfg.l2), .l3(cfg.l3),
    .filt_out(ds_out)
  );

  integrator u_int (
    .clk, .rst_b, .din(ds_out), .taps(cfg.int_taps), .dout(int_out)
  );

  cfd u_cfd (
    .clk, .rst_b, .din(int_out), .a(cfg.cfd_a), .thrsh(cfg.cfd_thrsh),
    .noise_ch, .merge(cfg.cfd_merge), .amplitude, .trigg
  );

  always_comb begin
    if (int_out > $signed(DATA_W'(2**(ZS_IN_W-1)-1)))
      zs_in = ZS_IN_W'(2**(ZS_IN_W-1)-1);
    else if (int_out < -$signed(DATA_W'(2**(ZS_IN_W-1))))
      zs_in = ZS_IN_W'(-(2**(ZS_IN_W-1)));
    else
      zs_in = int_out[ZS_IN_W-1:0];
  end

  zero_suppression u_zs (
    .clk, .rst_b, .din(zs_in), .offset(cfg.zs_offset), .thrd(cfg.zs_thrd),
    .noise_ch, .seq_mask(cfg.zs_seq_mask), .postmask(cfg.zs_postmask),
    .premask(cfg.zs_premask), .dout(zs_dout), .flag(zs_flag)
  );

  always_comb begin
    if (cfg.mode == MODE_TRACKER) begin
      pulse = amplitude;
      flag  = trigg;
    end else begin
      pulse = zs_dout;
      flag  = zs_flag;
    end
  end
endmodule
