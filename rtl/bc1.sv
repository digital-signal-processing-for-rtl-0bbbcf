// bc1: first baseline correction stage.
//
// Subtracts a baseline from a signal, where each of the two can come from the
// ADC input, the fixed pedestal `fpd` or the per-channel 1024 x 10 SRAM. The
// five mode bits `control` (c4..c0) choose the data path:
//   c4 = 1: baseline = fpd;           c4 = 0: baseline = SRAM word
//   c0 = 1: signal   = SRAM word;     c0 = 0: signal   = ADC sample
//   c2 = 1: SRAM addressed by the ADC sample (look-up table)
//   c2 = 0, c1 = 1: SRAM addressed by the core time counter
//   c2 = 0, c1 = 0: SRAM addressed by the register interface (add, rd, wr)
//   c3 = 1 with c2..c1 = 01: the ADC sample is recorded at the time address
// This gives the document's modes: 1xxx0 pedestal subtraction, 1x011 test
// mode, 1x1x1 conversion, 0x010 periodic-disturbance subtraction, 0x1x0
// converted-baseline subtraction, x101x recording and x000x register access.
// The bit meanings are read off the document's mode list; the document does
// not print them.
//
// dout = signal - baseline, 13-bit signed, registered. Latency two clocks
// (SRAM read, then output register); the ADC sample is delayed one clock to
// meet the SRAM word. sram_rdata returns the SRAM word for register reads.
// Synchronous active-low reset of the data registers.
module bc1
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic        [ADC_W-1:0]  din,
  input  logic        [TIME_W-1:0] time_cnt,
  input  logic        [4:0]        control,
  input  logic        [9:0]        add,
  input  logic        [9:0]        fpd,
  input  logic        [9:0]        sram_data,
  input  logic                     rd,
  input  logic                     wr,
  output logic signed [DATA_W-1:0] dout,
  output logic        [9:0]        sram_rdata
);
  logic [9:0]       addr, wdata, q;
  logic             we, re;
  logic [ADC_W-1:0] din_d;
  logic [9:0]       sig, bsl;

  always_comb begin
    if (control[2])      addr = din;
    else if (control[1]) addr = time_cnt;
    else                 addr = add;
    if (control[3:1] == 3'b101) begin        // record input, time-wise
      we = 1'b1; wdata = din;
    end else if (control[2:1] == 2'b00) begin // register interface
      we = wr;   wdata = sram_data;
    end else begin
      we = 1'b0; wdata = sram_data;
    end
    re  = (control[2:1] == 2'b00) ? rd : 1'b1;
    sig = control[0] ? q   : din_d;
    bsl = control[4] ? fpd : q;
  end

  bc1_sram #(.DEPTH(1024), .WIDTH(10)) u_sram (
    .clk, .we, .re, .addr, .wdata, .rdata(q)
  );

  always_ff @(posedge clk) begin
    if (!rst_b) begin
      din_d <= '0;
      dout  <= '0;
    end else begin
      din_d <= din;
      dout  <= DATA_W'($signed({1'b0, sig})) - DATA_W'($signed({1'b0, bsl}));
    end
  end

  assign sram_rdata = q;
endmodule
