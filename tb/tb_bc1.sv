// tb_bc1: exercises every documented BC1 mode against a software copy of
// the SRAM: register-interface writes and reads, fixed pedestal
// subtraction, test-pattern playback (time-wise read), look-up conversion,
// periodic-disturbance subtraction, converted-baseline subtraction and
// recording of the input. Expected outputs are checked two clocks after the
// input (the BC1 latency); samples in flight across a mode change are not
// checked.
module tb_bc1;
  import gdsp_pkg::*;
  logic clk = 0, rst_b = 0;
  logic [9:0] din, time_cnt, add, fpd, sram_data, sram_rdata;
  logic [4:0] control;
  logic rd, wr;
  logic signed [12:0] dout;
  int checks = 0, failures = 0;
  int mem[1024];
  int hist[2];
  bit valid[2];
  int modes_seen = 0;

  bc1 dut (.clk, .rst_b, .din, .time_cnt, .control, .add, .fpd, .sram_data,
           .rd, .wr, .dout, .sram_rdata);
  always #5 clk = ~clk;

  function automatic int pat(int a);
    return (a * 13 + 5) % 1024;
  endfunction

  // one sample in the current mode; expected value follows the mode list
  task automatic step(input logic [9:0] x);
    int sig, bsl, ad, q;
    @(negedge clk);
    if (valid[1]) begin
      checks++;
      if (int'(dout) != hist[1]) begin
        failures++;
        if (failures < 10) $display("FAIL ctl=%b dout=%0d exp=%0d", control, dout, hist[1]);
      end
    end
    hist[1] = hist[0]; valid[1] = valid[0];
    din = x;
    time_cnt = time_cnt + 1'b1;
    ad = control[2] ? int'(x) : (control[1] ? int'(time_cnt) : int'(add));
    q  = mem[ad];
    sig = control[0] ? q : int'(x);
    bsl = control[4] ? int'(fpd) : q;
    hist[0] = sig - bsl; valid[0] = 1;
    if (control[3:1] == 3'b101) mem[ad] = int'(x);
  endtask

  task automatic set_mode(input logic [4:0] c);
    @(negedge clk);
    control = c; valid = '{0, 0};
    time_cnt = time_cnt + 1'b1;
    modes_seen++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; time_cnt = 0; add = 0; fpd = 10'd100; sram_data = 0; rd = 0; wr = 0;
    control = 5'b10000; valid = '{0, 0}; hist = '{0, 0};
    repeat (3) @(negedge clk);
    rst_b = 1;
    // register-interface writes (x000x)
    set_mode(5'b00000);
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); wr = 1; add = 10'(a); sram_data = 10'(pat(a)); mem[a] = pat(a);
    end
    @(negedge clk); wr = 0;
    // register-interface reads
    for (int a = 0; a < 1024; a += 97) begin
      @(negedge clk); rd = 1; add = 10'(a);
      @(posedge clk); #1;
      checks++;
      if (sram_rdata != 10'(pat(a))) begin failures++; $display("FAIL read %0d", a); end
    end
    @(negedge clk); rd = 0;
    // fixed pedestal (1xxx0)
    set_mode(5'b10000);
    for (int i = 0; i < 200; i++) step(10'($urandom));
    // test mode (1x011)
    set_mode(5'b10011);
    for (int i = 0; i < 200; i++) step(10'($urandom));
    // conversion (1x1x1)
    set_mode(5'b10101);
    for (int i = 0; i < 200; i++) step(10'($urandom));
    // periodic disturbance subtraction (0x010)
    set_mode(5'b00010);
    for (int i = 0; i < 200; i++) step(10'($urandom));
    // converted baseline subtraction (0x1x0)
    set_mode(5'b00100);
    for (int i = 0; i < 200; i++) step(10'($urandom));
    // recording (x101x), then play back in test mode with no pedestal
    set_mode(5'b11010);
    for (int i = 0; i < 1024; i++) step(10'($urandom));
    fpd = 0;
    set_mode(5'b10011);
    for (int i = 0; i < 1100; i++) step(10'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
