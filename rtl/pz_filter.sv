// pz_filter: first-order pole-zero section of the Digital Shaper.
//
// Transposed direct form: result = in + c, where the state register c holds
// K*result - L*in of the previous sample. The transfer function is
// (1 - L z^-1) / (1 - K z^-1) with K = K_var/2^13 and L = L_var/2^13, both in
// [0,1). Arithmetic wraps around in 13 bits (the document describes no
// saturation); the coefficients are expected to keep the signal in range. The input-to-result
// path is combinational; only c is registered. The state is cleared on a
// clock edge while rst_b is low (synchronous active-low reset).
module pz_filter
  import gdsp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_b,
  input  logic signed [DATA_W-1:0] din,
  input  logic        [COEF_W-1:0] k,     // pole
  input  logic        [COEF_W-1:0] l,     // zero
  output logic signed [DATA_W-1:0] result
);
  logic signed [DATA_W-1:0] m1, m2, a, c;

  ds_mult u_mult1 (.p(l), .n(din),    .r(m1));
  ds_mult u_mult2 (.p(k), .n(result), .r(m2));

  always_comb begin
    result = din + c;
    a      = m2 - m1;
  end

  always_ff @(posedge clk) begin
    if (!rst_b) c <= '0;
    else        c <= a;
  end
endmodule
