// gdsp_pkg: widths, types and latencies shared by the blocks of the GdSP
// per-channel DSP chain.
//
// The chain runs at the 40 MHz sampling clock, one sample per clock per
// channel. ADC samples are 10-bit unsigned; after baseline correction all
// data are 13-bit signed two's complement, as in the document's I/O tables.
// The zero-suppression data path is 11-bit signed in and 10-bit unsigned out.
// Latencies are this implementation's own (every filter output is
// registered, as the document recommends); testbenches use them to align
// expected values with the outputs.
package gdsp_pkg;

  localparam int unsigned ADC_W   = 10;  // ADC sample, unsigned
  localparam int unsigned DATA_W  = 13;  // signed data between filters
  localparam int unsigned COEF_W  = 13;  // pole/zero coefficients, value/2^13
  localparam int unsigned ZS_IN_W = 11;  // zero-suppression input, signed
  localparam int unsigned AMP_W   = 10;  // CFD amplitude / Pulse word
  localparam int unsigned TIME_W  = 10;  // core time counter, BC1 SRAM address
  localparam int unsigned CFD_A_W = 7;   // CFD slope relation a, 4.3 fixed point

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic        [ADC_W-1:0]  adc_t;

  // Operating mode of a channel: tracker or waveform read-out.
  typedef enum logic {
    MODE_TRACKER  = 1'b0,   // Pulse = CFD amplitude, Flag = trigger
    MODE_WAVEFORM = 1'b1    // Pulse = ZS data, Flag = ZS flag
  } dsp_mode_e;

  // Configuration-register variables shared by all channels of the core.
  // Names follow the filters' register tables; `mode` selects what goes to
  // the Pulse/Flag outputs.
  typedef struct packed {
    // Baseline correction (control[4:0] BC1 mode, [5] BC1 on, [6] BC2 on)
    logic [6:0]  control;
    logic [9:0]  fpd;
    logic [9:0]  add;
    logic [9:0]  sram_data;
    logic        rd;
    logic        wr;
    logic [5:0]  edges;
    logic [3:0]  flat;
    logic        glitch;
    logic [4:0]  latency;
    logic        thr_override;
    logic [1:0]  taps_en;
    logic [8:0]  thrsh_b2h;
    logic [8:0]  thrsh_b2l;
    // Digital shaper
    logic        sel_filt;
    logic [12:0] k1, k2, k3;
    logic [12:0] l1, l2, l3;
    // Integrator
    logic [1:0]  int_taps;
    // Constant fraction discriminator
    logic [6:0]  cfd_a;
    logic [9:0]  cfd_thrsh;
    logic [1:0]  cfd_merge;
    // Zero suppression
    logic [9:0]  zs_offset;
    logic [9:0]  zs_thrd;
    logic [1:0]  zs_seq_mask;
    logic [2:0]  zs_postmask;
    logic [1:0]  zs_premask;
    // Output selection
    dsp_mode_e   mode;
  } dsp_cfg_t;

  // Pipeline latencies (clock cycles from input port to output port).
  localparam int unsigned BC1_LAT  = 2;   // SRAM read + output register
  localparam int unsigned BC2_LAT  = 1;
  localparam int unsigned INT_LAT  = 1;
  localparam int unsigned DS_LAT   = 1;
  localparam int unsigned CFD_LAT  = 2;   // trigger for sample pair (n-1, n) at n+2
  localparam int unsigned ZS_LAT   = 12;

endpackage
