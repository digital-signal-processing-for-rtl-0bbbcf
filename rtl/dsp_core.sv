// dsp_core: the digital signal processing core of the GdSP front-end chip.
//
// NCH identical channel chains (128 in the main configuration, 64 in the
// reduced one) share one set of configuration variables (cfg) and a 10-bit
// free-running time counter, which addresses the baseline-correction
// memories sample by sample ("time-wise") for recording, test-pattern
// playback and periodic-disturbance subtraction. Each channel has its own
// noise level noise_ch[i], added to the BC2, CFD and ZS thresholds. Register
// accesses to the BC1 memories (cfg.rd / cfg.wr) go to the channel chosen
// by sram_ch, whose memory word is returned on sram_rdata.
//
// Clock: 40 MHz sampling clock, one ADC sample per channel per clock. Reset:
// rst_b (active low, synchronous) clears everything; ma_rst_b resets only
// the moving-average units and their control logic; both may be used while
// taking data. Per channel the outputs are Pulse (10 bits) and Flag for the
// trigger-latency memory and trigg for the fast trigger link.
//
// The channel counts, the counter width and the reset scheme follow the
// document; the register-access channel select is this design's.
module dsp_core
  import gdsp_pkg::*;
#(
  parameter int unsigned NCH = 128
) (
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic                     ma_rst_b,
  input  logic        [ADC_W-1:0]  din       [NCH],
  input  dsp_cfg_t                 cfg,
  input  logic        [9:0]        noise_ch  [NCH],
  input  logic        [$clog2(NCH)-1:0] sram_ch,
  output logic        [AMP_W-1:0]  pulse     [NCH],
  output logic                     flag      [NCH],
  output logic                     trigg     [NCH],
  output logic signed [DATA_W-1:0] bsl_out   [NCH],
  output logic                     bsl_frozen[NCH], // BC2 baseline held
  output logic        [9:0]        sram_rdata,
  output logic        [TIME_W-1:0] time_cnt
);
  logic [9:0] rdata [NCH];

  always_ff @(posedge clk) begin
    if (!rst_b) time_cnt <= '0;
    else        time_cnt <= time_cnt + 1'b1;
  end

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    dsp_channel u_ch (
      .clk, .rst_b, .ma_rst_b, .din(din[i]), .time_cnt, .cfg,
      .noise_ch(noise_ch[i]), .sram_sel(sram_ch == i),
      .pulse(pulse[i]), .flag(flag[i]), .trigg(trigg[i]),
      .bsl_out(bsl_out[i]), .sram_rdata(rdata[i]), .bsl_frozen(bsl_frozen[i])
    );
  end

  assign sram_rdata = rdata[sram_ch];
endmodule
