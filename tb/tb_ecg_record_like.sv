// tb_ecg_record_like: the whole core at default parameters on a 60 s
// synthetic record shaped like a clinical ECG with heavy baseline wander.
//
// Each beat is a sum of Gaussian waves (P, Q, R, S, T) with a random R height
// (1200 - 1800 LSB) and a random RR interval (0.6 - 1.0 s, 60 - 100 beats per
// minute). The baseline wander has two components, 2500 LSB at 0.2 Hz and
// 1200 LSB at 0.55 Hz, and there is +-30 LSB noise.
//
// Checks: blw and d3 equal the reference filter bank bit for bit for every
// sample; the wander left in ecg_clean, measured against the wander-free beat
// signal, is under 5 % of the wander power; and, after the 2 s learning phase,
// beat detection scores at least 95 % sensitivity (QRS found / QRS present)
// and 95 % positive predictivity (correct beats / beats reported). A beat
// counts as matching a QRS when it is reported 5 to 45 samples after its R
// peak.
module tb_ecg_record_like;
  import tb_dwt_ref::*;

  localparam int  IN_W  = 16;
  localparam int  W     = 24;
  localparam int  DELAY = 889;
  localparam int  FS    = 200;
  localparam int  N     = 60 * FS;
  localparam int  GAP   = 20;
  localparam real PI    = 3.14159265358979;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                   ecg_valid = 1'b0;
  logic signed [IN_W-1:0] ecg_in = '0;
  logic                   out_valid, d3_valid, qrs_flag, beat;
  logic signed [IN_W-1:0] ecg_delayed;
  logic signed [W-1:0]    blw, ecg_clean, d3_data;
  logic        [W-1:0]    qrs_threshold;

  ecg_dwt_preproc dut (.clk, .rst, .ecg_valid, .ecg_in, .out_valid, .ecg_delayed,
                       .blw, .ecg_clean, .d3_valid, .d3_data, .qrs_flag, .beat,
                       .qrs_threshold);

  int checks = 0, failures = 0;
  seq_t x, ed3, er0;
  real heart[N], wander[N];
  int  r_peaks[$], beat_at[$];
  int  nout = 0, nd3 = 0, idx = -1, bad_bits = 0;
  real res_sq = 0.0, wan_sq = 0.0, mean_h = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic real gauss(real t, real mu, real sigma, real amp);
    return amp * $exp(-((t - mu) * (t - mu)) / (2.0 * sigma * sigma));
  endfunction

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      if (blw != W'(er0[nout]) || ecg_clean != W'(ecg_delayed) - blw) bad_bits++;
      if (nout >= DELAY + 1000) begin
        res_sq += (real'(ecg_clean) - (heart[nout-DELAY] - mean_h)) ** 2;
        wan_sq += wander[nout-DELAY] ** 2;
      end
      nout++;
    end
    if (d3_valid) begin
      if (d3_data != W'(ed3[nd3])) bad_bits++;
      nd3++;
    end
    if (beat) beat_at.push_back(idx);
  end

  initial begin
    int c;
    // Beat positions and shapes
    for (int i = 0; i < N; i++) heart[i] = 0.0;
    c = 100;
    while (c < N) begin
      real rh;
      r_peaks.push_back(c);
      rh = 1200.0 + real'($urandom_range(0, 600));
      for (int i = c - 60; i < c + 110 && i < N; i++) begin
        real t;
        if (i < 0) continue;
        t = real'(i);
        heart[i] += gauss(t, c - 36, 5.0, 150.0)      // P
                  + gauss(t, c - 6,  2.0, -180.0)     // Q
                  + gauss(t, c,      2.5, rh)         // R
                  + gauss(t, c + 6,  2.0, -350.0)     // S
                  + gauss(t, c + 60, 10.0, 350.0);    // T
      end
      c += $urandom_range(120, 200);
    end
    for (int i = 0; i < N; i++) mean_h += heart[i] / real'(N);
    for (int i = 0; i < N; i++) begin
      real tt;
      tt = real'(i) / real'(FS);
      wander[i] = 2500.0 * $sin(2.0 * PI * 0.2 * tt) + 1200.0 * $sin(2.0 * PI * 0.55 * tt + 1.0);
      x.push_back(longint'($rtoi(heart[i] + wander[i])) + longint'($urandom_range(0, 60)) - 30);
    end
    begin
      seq_t t;
      t = x;
      for (int j = 1; j <= 7; j++) begin
        if (j == 3) ed3 = analyse(t, 1'b0, 1, W);
        t = analyse(t, 1'b0, 0, W);
      end
      for (int j = 0; j < 7; j++) t = synthesise(t, 1'b0, W);
      er0 = t;
    end

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      ecg_valid <= 1'b1;
      ecg_in    <= IN_W'(x[i]);
      idx       <= i;
      @(posedge clk);
      ecg_valid <= 1'b0;
      repeat (GAP - 1) @(posedge clk);
    end
    repeat (GAP) @(posedge clk);

    check(nout == N, $sformatf("output count %0d", nout));
    check(bad_bits == 0, $sformatf("%0d samples differ from the reference", bad_bits));
    check(res_sq < 0.05 * wan_sq, $sformatf("wander left: %0.4f of its power", res_sq / wan_sq));
    begin
      int tp, fn, fp, qrs_n;
      bit used[$];
      real se, pp;
      tp = 0; fn = 0; fp = 0; qrs_n = 0;
      foreach (beat_at[k]) used.push_back(1'b0);
      foreach (r_peaks[q]) begin
        bit found;
        if (r_peaks[q] < 440 || r_peaks[q] > N - 50) continue;
        qrs_n++;
        found = 1'b0;
        foreach (beat_at[k])
          if (!found && !used[k] && beat_at[k] >= r_peaks[q] + 5 && beat_at[k] <= r_peaks[q] + 45) begin
            used[k] = 1'b1;
            found = 1'b1;
          end
        if (found) tp++; else fn++;
      end
      foreach (beat_at[k]) if (!used[k] && beat_at[k] >= 445) fp++;
      se = 100.0 * real'(tp) / real'(tp + fn);
      pp = 100.0 * real'(tp) / real'(tp + fp);
      $display("QRS %0d: TP %0d FN %0d FP %0d, sensitivity %0.1f %%, positive predictivity %0.1f %%",
               qrs_n, tp, fn, fp, se, pp);
      $display("wander left in ecg_clean: %0.4f of its power", res_sq / wan_sq);
      check(qrs_n > 50, "enough beats in the record");
      check(se >= 95.0, "sensitivity >= 95 %");
      check(pp >= 95.0, "positive predictivity >= 95 %");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GAP * N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
