// tb_integrator: random signed samples through all four tap settings,
// compared one clock later with floor((x0 + x1)/2) and floor((x0+..+x3)/4)
// computed from the TB's own record of past inputs.
module tb_integrator;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0;
  logic signed [12:0] din, dout;
  logic [1:0] taps;
  int checks = 0, failures = 0;
  int hist[4];
  int exp_next;

  integrator dut (.clk, .rst_b, .din, .taps, .dout);
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
    din = 0; taps = 0; hist = '{0, 0, 0, 0}; exp_next = 0;
    repeat (3) @(negedge clk);
    rst_b = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(dout) != exp_next) begin
        failures++;
        if (failures < 10) $display("FAIL taps=%0d dout=%0d exp=%0d", taps, dout, exp_next);
      end
      if (i % 50 == 0) taps = 2'($urandom);
      din = 13'($signed(12'($urandom)));
      for (int j = 3; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = int'(din);
      case (taps)
        2'b00: exp_next = hist[0];
        2'b01, 2'b10: exp_next = fdiv(hist[0] + hist[1], 2);
        default: exp_next = fdiv(hist[0] + hist[1] + hist[2] + hist[3], 4);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
