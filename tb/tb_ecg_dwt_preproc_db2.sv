// tb_ecg_dwt_preproc_db2: the reduced-size configuration, the whole core
// built with 4-tap Daubechies-2 filters (WAVELET = DB2), as used for small
// devices, on the same kind of signal as the main end-to-end test (20 s of a
// synthetic ECG at 200 Hz with a 0.25 Hz, 3000-LSB baseline wander).
// Checks: one output per sample; ecg_delayed is the input (2^7-1)*3 = 381
// samples earlier; blw and d3 equal the db2 reference filter bank bit for bit;
// ecg_clean = ecg_delayed - blw; and once settled the wander left in ecg_clean
// is under 2 % of its power.
module tb_ecg_dwt_preproc_db2;
  import dwt_pkg::*;
  import tb_dwt_ref::*;

  localparam int  IN_W  = 16;
  localparam int  W     = 24;
  localparam int  DELAY = 381;
  localparam int  FS    = 200;
  localparam int  N     = 20 * FS;
  localparam int  GAP   = 20;
  localparam int  RR    = 160;
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

  ecg_dwt_preproc #(.WAVELET(DB2)) dut (
    .clk, .rst, .ecg_valid, .ecg_in, .out_valid, .ecg_delayed, .blw, .ecg_clean,
    .d3_valid, .d3_data, .qrs_flag, .beat, .qrs_threshold);

  int checks = 0, failures = 0;
  seq_t x, wander, heart, ed3, er0;
  int nout = 0, nd3 = 0, idx = -1, nbeats = 0;
  real res_sq = 0.0, wan_sq = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      longint xd;
      xd = (nout >= DELAY) ? x[nout-DELAY] : 0;
      check(nout == idx, $sformatf("output %0d in period of sample %0d", nout, idx));
      check(ecg_delayed == IN_W'(xd), $sformatf("ecg_delayed[%0d]", nout));
      check(blw == W'(er0[nout]), $sformatf("blw[%0d] = %0d, want %0d", nout, blw, er0[nout]));
      check(ecg_clean == W'(xd) - blw, $sformatf("ecg_clean[%0d]", nout));
      if (nout >= DELAY + 1000) begin
        res_sq += (real'(ecg_clean) - real'(heart[nout-DELAY]) + 112.5) ** 2;
        wan_sq += real'(wander[nout-DELAY]) ** 2;
      end
      nout++;
    end
    if (d3_valid) begin
      check(d3_data == W'(ed3[nd3]), $sformatf("d3[%0d]", nd3));
      nd3++;
    end
    if (beat) nbeats++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      longint h, wv;
      int ph;
      ph = (i + RR - 40) % RR;
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
        if (j == 3) ed3 = analyse(t, 1'b1, 1, W);
        t = analyse(t, 1'b1, 0, W);
      end
      for (int j = 0; j < 7; j++) t = synthesise(t, 1'b1, W);
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
    check(res_sq < 0.02 * wan_sq, $sformatf("wander left: %0.4f of its power", res_sq / wan_sq));
    check(nbeats > 0, "beats reported");
    $display("db2: residual wander power %0.5f, beats %0d", res_sq / wan_sq, nbeats);
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
