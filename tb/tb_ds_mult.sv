// tb_ds_mult: checks the shaper's fractional multiplier against
// floor(p*n / 2^13) computed with 64-bit integer arithmetic, on corner
// values and random operands. Combinational, no clock.
module tb_ds_mult;
  import gdsp_pkg::*;
  logic        [12:0] p;
  logic signed [12:0] n, r;
  int checks = 0, failures = 0;

  ds_mult dut (.p, .n, .r);

  function automatic longint floor_div(longint num, longint den);
    longint q = num / den;
    if ((num % den != 0) && (num < 0)) q = q - 1;
    return q;
  endfunction

  task automatic check(input logic [12:0] pp, input logic signed [12:0] nn);
    longint exp;
    p = pp; n = nn;
    #1;
    exp = floor_div(longint'(pp) * longint'(nn), 8192);
    checks++;
    if (longint'(r) != exp) begin
      failures++;
      $display("FAIL p=%0d n=%0d r=%0d exp=%0d", pp, nn, r, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(13'd0, 13'sd0);
    check(13'd8191, 13'sd4095);
    check(13'd8191, -13'sd4096);
    check(13'd4096, -13'sd1);      // -0.5 -> floor = -1
    check(13'd4096, 13'sd1);       // 0.5 -> 0
    check(13'd1, -13'sd4096);
    check(13'd8191, -13'sd1);
    for (int i = 0; i < 5000; i++) check(13'($urandom), 13'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
