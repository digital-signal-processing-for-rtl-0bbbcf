// mau: Moving Average Unit of the second baseline correction.
//
// An eight-deep sample pipeline z[0] (newest) .. z[7] shifts in `din` on
// every clock with shift_en set, and holds while it is low (baseline frozen
// during pulses). The baseline is a direct sum, not an accumulator: the
// newest 2, 4 or 8 pipeline words are added and divided by dropping 1, 2 or
// 3 LSBs (arithmetic shift). taps_en selects 00 = 2, 01 or 10 = 4, 11 = 8
// samples. bsl is combinational from the pipeline registers, so a new
// sample affects it one clock after it is shifted in. The direct-sum form
// and the 2/4/8 choice follow the document; the taps_en encoding is read
// from the select values printed in the document's older moving-average
// diagram. Synchronous active-low reset clears the pipeline.
module mau
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic                     shift_en,
  input  logic signed [DATA_W-1:0] din,
  input  logic        [1:0]        taps_en,
  output logic signed [DATA_W-1:0] bsl
);
  logic signed [DATA_W-1:0] z [8];
  logic signed [DATA_W+2:0] sum2, sum4, sum8;

  always_comb begin
    sum2 = (DATA_W+3)'(z[0]) + (DATA_W+3)'(z[1]);
    sum4 = sum2 + (DATA_W+3)'(z[2]) + (DATA_W+3)'(z[3]);
    sum8 = sum4 + (DATA_W+3)'(z[4]) + (DATA_W+3)'(z[5])
                + (DATA_W+3)'(z[6]) + (DATA_W+3)'(z[7]);
    unique case (taps_en)
      2'b00:        bsl = sum2[DATA_W:1];
      2'b01, 2'b10: bsl = sum4[DATA_W+1:2];
      default:      bsl = sum8[DATA_W+2:3];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_b) begin
      for (int i = 0; i < 8; i++) z[i] <= '0;
    end else if (shift_en) begin
      z[0] <= din;
      for (int i = 1; i < 8; i++) z[i] <= z[i-1];
    end
  end
endmodule
