// digital_shaper: third-order pole-zero Digital Shaper (DS).
//
// Three first-order pole-zero sections in cascade implement
//   H(z) = prod_i (1 - L_i z^-1) / (1 - K_i z^-1),  i = 1..3,
// with coefficients given as 13-bit integers (value/2^13). Raising a pole
// shortens the tail; raising a zero lengthens the peaking time. When sel_filt
// is 0 the cascade input is forced to zero (its state decays to zero) and the
// input passes straight through. The output is registered: latency one clock
// in both settings. Structure and widths follow the document; reset is
// synchronous active low.
module digital_shaper
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic signed [DATA_W-1:0] filt_in,
  input  logic                     sel_filt,   // 1: filter, 0: bypass
  input  logic        [COEF_W-1:0] k1, k2, k3, // poles
  input  logic        [COEF_W-1:0] l1, l2, l3, // zeros
  output logic signed [DATA_W-1:0] filt_out
);
  logic signed [DATA_W-1:0] x0, r1, r2, r3, y;

  assign x0 = sel_filt ? filt_in : '0;

  pz_filter u_f1 (.clk, .rst_b, .din(x0), .k(k1), .l(l1), .result(r1));
  pz_filter u_f2 (.clk, .rst_b, .din(r1), .k(k2), .l(l2), .result(r2));
  pz_filter u_f3 (.clk, .rst_b, .din(r2), .k(k3), .l(l3), .result(r3));

  assign y = sel_filt ? r3 : filt_in;

  always_ff @(posedge clk) begin
    if (!rst_b) filt_out <= '0;
    else        filt_out <= y;
  end
endmodule
