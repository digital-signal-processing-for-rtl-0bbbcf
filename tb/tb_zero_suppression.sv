// tb_zero_suppression: random sparse pulse trains (runs of 1..8 samples
// above threshold separated by 1..12 quiet samples) under random settings.
// The expected flag of every sample is computed from the whole recorded
// sequence, following the described rules in order: threshold, drop runs of
// at most seq_mask samples, add premask samples before and postmask samples
// after each kept run, then fill gaps of one or two samples. dout and flag
// are compared ZS_LAT clocks after the sample entered, which also checks the
// latency. Offset and clipping are checked through dout.
module tb_zero_suppression;
  import gdsp_pkg::*;
  localparam int N = 600;
  logic clk = 0, rst_b = 0;
  logic signed [10:0] din;
  logic [9:0] offset, thrd, noise_ch, dout;
  logic [1:0] seq_mask, premask;
  logic [2:0] postmask;
  logic flag;
  int checks = 0, failures = 0;
  int x[N], u[N];
  bit above[N], kept[N], ext[N], merged[N];
  int n_flag = 0, n_merge_fill = 0;

  zero_suppression dut (.clk, .rst_b, .din, .offset, .thrd, .noise_ch,
                        .seq_mask, .postmask, .premask, .dout, .flag);
  always #5 clk = ~clk;

  task automatic build_expected();
    int thr = int'(thrd) + int'(noise_ch);
    for (int k = 0; k < N; k++) begin
      int v = x[k] + int'(offset);
      u[k] = v < 0 ? 0 : (v > 1023 ? 1023 : v);
      above[k] = u[k] > thr;
      kept[k] = 0; ext[k] = 0; merged[k] = 0;
    end
    // glitch filter over runs
    for (int k = 0; k < N; ) begin
      if (above[k]) begin
        int e = k;
        while (e < N && above[e]) e++;
        if (e - k > int'(seq_mask)) for (int j = k; j < e; j++) kept[j] = 1;
        k = e;
      end else k++;
    end
    // pre and post samples
    for (int k = 0; k < N; k++) begin
      if (kept[k]) begin
        ext[k] = 1;
        for (int j = 1; j <= int'(premask); j++) if (k - j >= 0) ext[k-j] = 1;
        if (k + 1 < N && !kept[k+1])
          for (int j = 1; j <= int'(postmask); j++) if (k + j < N) ext[k+j] = 1;
      end
    end
    // merge gaps of one or two samples
    for (int k = 0; k < N; k++) merged[k] = ext[k];
    for (int k = 1; k < N - 2; k++) begin
      if (ext[k-1] && !ext[k] && ext[k+1]) merged[k] = 1;
      if (ext[k-1] && !ext[k] && !ext[k+1] && ext[k+2]) begin merged[k] = 1; merged[k+1] = 1; end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 24; run++) begin
      rst_b = 0; din = -11'sd1024;       // clips to 0: never above threshold
      offset = 10'($urandom_range(0, 200)); thrd = 10'($urandom_range(150, 400));
      noise_ch = 10'($urandom_range(0, 30));
      seq_mask = 2'(run % 4); premask = 2'($urandom); postmask = 3'($urandom);
      // sparse pulses, a few clipped on either side
      for (int k = 0; k < N; ) begin
        int q, r;
        q = $urandom_range(1, 12); r = $urandom_range(1, 8);
        for (int j = 0; j < q && k < N; j++) x[k++] = $signed(11'($urandom_range(0, 60))) - 30;
        for (int j = 0; j < r && k < N; j++) x[k++] = $urandom_range(500, 1023);
      end
      x[3] = -1024; x[4] = 1023;
      build_expected();
      repeat (2) @(negedge clk);
      rst_b = 1;
      for (int c = 0; c < N + ZS_LAT; c++) begin
        @(negedge clk);
        if (c >= ZS_LAT) begin
          int k;
          k = c - ZS_LAT;
          checks++;
          if (flag != merged[k] || int'(dout) != u[k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL run=%0d k=%0d flag=%0b exp=%0b dout=%0d exp=%0d seq=%0d pre=%0d post=%0d",
                       run, k, flag, merged[k], dout, u[k], seq_mask, premask, postmask);
          end
          if (flag) n_flag++;
          if (merged[k] && !ext[k]) n_merge_fill++;
        end
        din = c < N ? 11'(x[c]) : -11'sd1024;
      end
    end
    checks++;
    if (n_flag == 0 || n_merge_fill == 0) begin
      failures++; $display("FAIL coverage flags=%0d merge_fills=%0d", n_flag, n_merge_fill);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
