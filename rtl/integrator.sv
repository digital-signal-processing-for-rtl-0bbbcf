// integrator: programmable noise-smoothing filter in front of the CFD.
//
// The input runs through a three-sample pipeline s2, s1, s0 (s2 newest).
// taps = 00 passes the input through; 01 or 10 output (din + s2) / 2, the
// first-order integral; 11 outputs (din + s2 + s1 + s0) / 4, the second-order
// integral. Division drops the LSBs (arithmetic shift, rounds toward minus
// infinity). The output is registered: latency one clock. Pipeline, tap
// encoding and LSB dropping follow the document; the output register and
// synchronous active-low reset are this design's choice.
module integrator
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic signed [DATA_W-1:0] din,
  input  logic        [1:0]        taps,
  output logic signed [DATA_W-1:0] dout
);
  logic signed [DATA_W-1:0] s2, s1, s0;
  logic signed [DATA_W+1:0] sum2, sum4;
  logic signed [DATA_W-1:0] sel;

  always_comb begin
    sum2 = (DATA_W+2)'(din) + (DATA_W+2)'(s2);
    sum4 = sum2 + (DATA_W+2)'(s1) + (DATA_W+2)'(s0);
    unique case (taps)
      2'b00:         sel = din;
      2'b01, 2'b10:  sel = sum2[DATA_W:1];
      default:       sel = sum4[DATA_W+1:2];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_b) begin
      s2 <= '0; s1 <= '0; s0 <= '0; dout <= '0;
    end else begin
      s2 <= din; s1 <= s2; s0 <= s1;
      dout <= sel;
    end
  end
endmodule
