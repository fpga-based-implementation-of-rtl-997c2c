// tb_blw_canceller: checks baseline-wander removal at its defaults (db4,
// 7 levels, 889-sample delay). The testbench plays the decomposition: it
// computes a7 with the reference pyramid and presents a7[m] 7 cycles after the
// strobe of sample 128*m, as the decomposition does. For every ECG sample n
// exactly one output must appear, before the next strobe, with
//   ecg_delayed = x[n-889], blw = a7 rebuilt by the reference (seven rounds of
//   zero insertion and Lo_R), ecg_clean = ecg_delayed - blw.
// It also checks that a constant input is removed completely once the filters
// have filled (blw within 8 LSB of the constant, ecg_clean within 8 LSB of 0).
module tb_blw_canceller;
  import dwt_pkg::*;
  import tb_dwt_ref::*;

  localparam int IN_W  = 16;
  localparam int W     = 24;
  localparam int DELAY = 889;
  localparam int N     = 128 * 16;
  localparam int GAP   = 24;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                   x_valid = 1'b0;
  logic signed [IN_W-1:0] x_data = '0;
  logic                   a_valid = 1'b0;
  logic signed [W-1:0]    a_data = '0;
  logic                   out_valid;
  logic signed [IN_W-1:0] ecg_delayed;
  logic signed [W-1:0]    blw, ecg_clean;

  blw_canceller dut (.clk, .rst, .x_valid, .x_data, .a_valid, .a_data,
                     .out_valid, .ecg_delayed, .blw, .ecg_clean);

  int checks = 0, failures = 0;
  seq_t x, a7, r0;
  int nout = 0;
  int idx = -1;
  int const_ok = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst && out_valid) begin
    longint xd;
    xd = (nout >= DELAY) ? x[nout-DELAY] : 0;
    check(nout == idx, $sformatf("output %0d in period of sample %0d", nout, idx));
    check(ecg_delayed == IN_W'(xd), $sformatf("ecg_delayed[%0d] = %0d", nout, ecg_delayed));
    check(blw == W'(r0[nout]), $sformatf("blw[%0d] = %0d, want %0d", nout, blw, r0[nout]));
    check(ecg_clean == W'(xd - r0[nout]), $sformatf("ecg_clean[%0d] = %0d", nout, ecg_clean));
    // Q1.15 coefficients and rounding down leave a residual of a few LSB.
    if (nout >= N / 2 + 2 * DELAY) begin
      if (blw - W'(x[0]) <= 8 && blw - W'(x[0]) >= -8 && ecg_clean <= 8 && ecg_clean >= -8)
        const_ok++;
      else if (const_ok == 0) $display("constant: blw=%0d clean=%0d", blw, ecg_clean);
    end
    nout++;
  end

  initial begin
    seq_t t;
    // First half: random walk with noise; second half: a constant.
    longint walk;
    walk = 3000;
    for (int i = 0; i < N / 2; i++) begin
      walk += $signed(6'($urandom));
      x.push_back(walk + $signed(8'($urandom)));
    end
    for (int i = N / 2; i < N + 2 * DELAY + 256; i++) x.push_back(-1234);
    x[0] = -1234;
    t = x;
    for (int j = 0; j < 7; j++) t = analyse(t, 1'b0, 0, W);
    a7 = t;
    for (int j = 0; j < 7; j++) t = synthesise(t, 1'b0, W);
    r0 = t;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < x.size(); i++) begin
      x_valid <= 1'b1;
      x_data  <= IN_W'(x[i]);
      idx     <= i;
      @(posedge clk);
      x_valid <= 1'b0;
      repeat (6) @(posedge clk);
      if (i % 128 == 0) begin
        a_valid <= 1'b1;
        a_data  <= W'(a7[i/128]);
        @(posedge clk);
        a_valid <= 1'b0;
        repeat (GAP - 8) @(posedge clk);
      end else begin
        repeat (GAP - 7) @(posedge clk);
      end
    end
    check(nout == x.size(), $sformatf("output count %0d of %0d", nout, x.size()));
    check(const_ok > 200, $sformatf("constant input removed on %0d samples", const_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GAP * (N + 2 * DELAY + 256) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
