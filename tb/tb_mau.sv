// tb_mau: shifts random samples into the moving average unit with random
// freezes and checks the 2/4/8-sample averages against a software copy of
// the pipeline; also checks that the pipeline holds while shift_en is low.
module tb_mau;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0, shift_en;
  logic signed [12:0] din, bsl;
  logic [1:0] taps_en;
  int checks = 0, failures = 0;
  int z[8];

  mau dut (.clk, .rst_b, .shift_en, .din, .taps_en, .bsl);
  always #5 clk = ~clk;

  function automatic int fdiv(int num, int den);
    int q = num / den;
    if ((num % den != 0) && (num < 0)) q = q - 1;
    return q;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, s;
    din = 0; shift_en = 0; taps_en = 0;
    for (int i = 0; i < 8; i++) z[i] = 0;
    repeat (3) @(negedge clk);
    rst_b = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      s = 0;
      case (taps_en)
        2'b00: begin for (int j = 0; j < 2; j++) s += z[j]; exp = fdiv(s, 2); end
        2'b01, 2'b10: begin for (int j = 0; j < 4; j++) s += z[j]; exp = fdiv(s, 4); end
        default: begin for (int j = 0; j < 8; j++) s += z[j]; exp = fdiv(s, 8); end
      endcase
      checks++;
      if (int'(bsl) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL taps=%0d bsl=%0d exp=%0d", taps_en, bsl, exp);
      end
      if (i % 37 == 0) taps_en = 2'($urandom);
      din = 13'($signed(12'($urandom)));
      shift_en = ($urandom_range(3) != 0);
      if (shift_en) begin
        for (int j = 7; j > 0; j--) z[j] = z[j-1];
        z[0] = int'(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
