// ds_mult: fractional multiplier of the Digital Shaper.
//
// Multiplies a signed 13-bit sample N by an unsigned 13-bit coefficient P
// and divides by 2^13, so P acts as a fraction P/2^13 in [0,1). Following
// the document's multiplier diagram, N is multiplied as if unsigned, the 13
// fraction bits are shifted away, and when N is negative (N[12] set) the
// excess P*2^13 term is removed by subtracting P. The result equals
// floor(P*N / 2^13) and always fits 13 bits. Purely combinational.
module ds_mult
  import gdsp_pkg::*;
(
  input  logic        [COEF_W-1:0] p,   // coefficient, unsigned fraction
  input  logic signed [DATA_W-1:0] n,   // signal, two's complement
  output logic signed [DATA_W-1:0] r    // floor(p*n / 2^13)
);
  logic [2*DATA_W-1:0] temp;   // unsigned product
  logic [DATA_W-1:0]   hi;     // temp >> 13

  always_comb begin
    temp = {{DATA_W{1'b0}}, p} * {{DATA_W{1'b0}}, $unsigned(n)};
    hi   = temp[2*DATA_W-1:COEF_W];
    r    = n[DATA_W-1] ? $signed(hi - p) : $signed(hi);
  end
endmodule
