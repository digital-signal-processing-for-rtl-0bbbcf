// baseline_correction: the two-stage Baseline Correction (BC) of a channel.
//
// BC1 (pedestal / SRAM based) feeds BC2 (moving-average baseline with the
// double threshold scheme). Either stage can be bypassed, which also
// removes its latency: control[5] enables BC1 (else the ADC sample is passed
// on zero-extended), control[6] enables BC2 (else the BC1 result is passed
// on). control[4:0] is the BC1 mode. Latency: 2 clocks through BC1 plus 1
// through BC2; 0 when both are bypassed. Input 10-bit unsigned, output and
// baseline 13-bit signed. Which bits of the 7-bit control word enable the
// stages is this design's choice; the document only says both stages are
// optional and that BC1 uses the first five bits.
module baseline_correction
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic                     ma_rst_b,
  input  logic        [ADC_W-1:0]  din,
  input  logic        [TIME_W-1:0] time_cnt,
  input  logic        [6:0]        control,
  input  logic        [9:0]        add,
  input  logic        [9:0]        fpd,
  input  logic        [9:0]        sram_data,
  input  logic                     rd,
  input  logic                     wr,
  input  logic        [5:0]        edges,
  input  logic        [3:0]        flat,
  input  logic                     glitch,
  input  logic        [4:0]        latency,
  input  logic        [9:0]        noise_ch,
  input  logic                     thr_override,
  input  logic        [1:0]        taps_en,
  input  logic        [8:0]        thrsh_b2h,
  input  logic        [8:0]        thrsh_b2l,
  output logic signed [DATA_W-1:0] dout,
  output logic signed [DATA_W-1:0] bsl_out,
  output logic        [9:0]        sram_rdata,
  output logic                     frozen
);
  logic signed [DATA_W-1:0] bc1_out, bc2_in, bc2_out;

  bc1 u_bc1 (
    .clk, .rst_b, .din, .time_cnt, .control(control[4:0]), .add, .fpd,
    .sram_data, .rd, .wr, .dout(bc1_out), .sram_rdata
  );

  assign bc2_in = control[5] ? bc1_out : DATA_W'(din);

  bc2 u_bc2 (
    .clk, .rst_b, .ma_rst_b, .din(bc2_in), .edges, .flat, .glitch, .latency,
    .noise_ch, .thr_override, .taps_en, .thrsh_h(thrsh_b2h), .thrsh_l(thrsh_b2l),
    .dout(bc2_out), .bsl_out, .frozen
  );

  assign dout = control[6] ? bc2_out : bc2_in;
endmodule
