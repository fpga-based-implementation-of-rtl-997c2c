// tb_ecg_dwt_preproc: end-to-end test of the ECG pre-processor with every
// parameter at its default (db4, 7 levels, 200 Hz samples, one strobe every
// 20 cycles).
//
// Stimulus: 30 s of a synthetic ECG at 200 Hz: a 10-sample triangular QRS of
// height 2000 every 160 samples (75 beats per minute), a 40-sample T wave of
// height 400 after each QRS, +-20 noise, and a 0.25 Hz baseline wander of
// amplitude 3000 (typical of respiration).
//
// Checks:
//   - one output per sample, in that sample's period;
//   - ecg_delayed is the input 889 samples earlier;
//   - blw and d3 equal the reference filter bank bit for bit, and
//     ecg_clean = ecg_delayed - blw;
//   - the wander is removed: once settled, blw follows the wander (plus the
//     small mean of the beats) within 10 % of its amplitude, and the wander
//     left in ecg_clean is under 10 % of the original;
//   - after the learning phase every QRS gives exactly one beat, reported
//     40 to 200 ms after the QRS peak (the level-3 filters delay the peak by
//     about 80 ms and it is confirmed one d3 sample later), and nothing else
//     is reported.
// Each mechanism is counted and must occur: learning-phase strobes, beats,
// candidates rejected by the refractory rule, noise-level updates of the
// threshold, and odd-phase samples handed on by the reconstruction.
module tb_ecg_dwt_preproc;
  import tb_dwt_ref::*;

  localparam int    IN_W  = 16;
  localparam int    W     = 24;
  localparam int    DELAY = 889;
  localparam int    FS    = 200;
  localparam int    N     = 30 * FS;
  localparam int    GAP   = 20;
  localparam int    RR    = 160;
  localparam int    QRS0  = 40;      // first QRS peak
  localparam real   PI    = 3.14159265358979;

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
  seq_t x, wander, heart, ea7, ed3, er0;
  int nout = 0, nd3 = 0, idx = -1;
  real max_blw_err = 0.0, res_sq = 0.0, wan_sq = 0.0;
  int  settled = 0;
  // mechanism counters
  int n_learn = 0, n_beats = 0, n_refract = 0, n_noise = 0, n_odd = 0, n_flag_cycles = 0;
  int beat_at[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Output stream
  always @(posedge clk) if (!rst && out_valid) begin
    longint xd, hd, wd;
    xd = (nout >= DELAY) ? x[nout-DELAY] : 0;
    check(nout == idx, $sformatf("output %0d in period of sample %0d", nout, idx));
    check(ecg_delayed == IN_W'(xd), $sformatf("ecg_delayed[%0d]", nout));
    check(blw == W'(er0[nout]), $sformatf("blw[%0d] = %0d, want %0d", nout, blw, er0[nout]));
    check(ecg_clean == W'(xd) - blw, $sformatf("ecg_clean[%0d]", nout));
    if (nout >= DELAY + 1000) begin
      real e;
      hd = heart[nout-DELAY];
      wd = wander[nout-DELAY];
      e = real'(blw) - real'(wd) - 112.5;   // 112.5: mean of the beats (QRS + T area / RR)
      if (e < 0) e = -e;
      if (e > max_blw_err) max_blw_err = e;
      res_sq += (real'(ecg_clean) - real'(hd) + 112.5) ** 2;
      wan_sq += real'(wd) ** 2;
      settled++;
    end
    nout++;
  end

  // d3 stream and the decision stage
  always @(posedge clk) if (!rst) begin
    if (d3_valid) begin
      check(d3_data == W'(ed3[nd3]), $sformatf("d3[%0d] = %0d, want %0d", nd3, d3_data, ed3[nd3]));
      nd3++;
      if (dut.u_qrs.learning) n_learn++;
      else if (dut.u_qrs.is_peak && !dut.u_qrs.is_qrs) begin
        if (dut.u_qrs.e1 > dut.u_qrs.thr) n_refract++;
        else n_noise++;
      end
    end
    if (beat) begin
      n_beats++;
      beat_at.push_back(idx);
    end
    if (qrs_flag) n_flag_cycles++;
    // Odd-phase samples leaving the last reconstruction level
    if (dut.u_blw.g_level[1].u_level.out_valid && !dut.u_blw.g_level[1].u_level.in_valid
        && dut.u_blw.rv[0] && idx % 2 == 1) n_odd++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      longint h, wv;
      int ph;
      ph = (i - QRS0 + RR) % RR;   // samples since the last QRS peak
      h = 0;
      if (ph <= 5)            h = 2000 - ph * 400;
      else if (ph >= RR - 5)  h = 2000 - (RR - ph) * 400;
      if (ph >= 50 && ph < 90) h += (ph < 70) ? (ph - 50) * 20 : (90 - ph) * 20;
      wv = longint'($rtoi(3000.0 * $sin(2.0 * PI * 0.25 * real'(i) / real'(FS))));
      heart.push_back(h);
      wander.push_back(wv);
      x.push_back(h + wv + longint'($urandom_range(0, 40)) - 20);
    end
    begin
      seq_t t;
      t = x;
      for (int j = 1; j <= 7; j++) begin
        if (j == 3) ed3 = analyse(t, 1'b0, 1, W);
        t = analyse(t, 1'b0, 0, W);
      end
      ea7 = t;
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
    check(nd3 == N / 8, $sformatf("d3 count %0d", nd3));
    check(max_blw_err < 300.0, $sformatf("blw tracks the wander: max error %0.1f", max_blw_err));
    check(res_sq < 0.01 * wan_sq, $sformatf("wander left in ecg_clean: %0.4f of its power",
                                            res_sq / wan_sq));
    // Beats: each QRS after the learning phase exactly once, 8 to 40 samples after its peak.
    begin
      int want, got;
      want = 0; got = 0;
      for (int c = QRS0; c < N - 20; c += RR) begin
        int hits;
        if (c < 50 * 8 + 16) continue;
        want++;
        hits = 0;
        foreach (beat_at[k]) if (beat_at[k] >= c + 8 && beat_at[k] <= c + 40) hits++;
        check(hits == 1, $sformatf("QRS at sample %0d reported %0d times", c, hits));
        if (hits == 1) got++;
      end
      check(n_beats == got, $sformatf("%0d beats for %0d matched QRS", n_beats, got));
      $display("QRS complexes %0d, detected %0d, beats reported %0d", want, got, n_beats);
      foreach (beat_at[k]) if ((beat_at[k] - QRS0) % RR < 8 || (beat_at[k] - QRS0) % RR > 40) $display("unmatched beat at sample %0d", beat_at[k]);
    end
    $display("blw max error %0.1f, residual wander power %0.5f", max_blw_err, res_sq / wan_sq);
    $display("mechanisms: learning=%0d beats=%0d refractory_rejects=%0d noise_updates=%0d odd_hand_on=%0d flag_cycles=%0d",
             n_learn, n_beats, n_refract, n_noise, n_odd, n_flag_cycles);
    check(n_learn > 0, "learning phase seen");
    check(n_beats > 0, "beats seen");
    check(n_refract > 0, "refractory rejection seen");
    check(n_noise > 0, "noise-level update seen");
    check(n_odd > 0, "odd-phase hand-on seen");
    check(n_flag_cycles > 0, "qrs_flag seen");
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
