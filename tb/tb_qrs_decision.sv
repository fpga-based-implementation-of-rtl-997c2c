// tb_qrs_decision: checks the QRS decision rules on a synthetic d3 stream.
// The stream holds small random noise (|d3| <= 40), a QRS-like pattern every
// 20 samples (-600, +1000, -700), a T-wave-like bump (120, 200, 120) 7 samples
// after each QRS, one spike of 1200 only 3 samples after a QRS (inside the
// refractory period) and one isolated ectopic beat of 900. Expected: no beat
// during the 50-sample learning phase; afterwards exactly one beat per QRS and
// one for the ectopic beat, each reported on the d3 strobe right after its
// peak, with qrs_flag high until the next strobe; T-waves, noise and the
// refractory spike never reported. The threshold after learning must equal a
// quarter of the largest learning peak.
module tb_qrs_decision;

  localparam int W       = 24;
  localparam int N       = 440;
  localparam int LEARN   = 50;
  localparam int PERIOD  = 20;
  localparam int REFR_AT = 110;   // QRS followed by the refractory spike
  localparam int ECTOPIC = 262;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                d_valid = 1'b0;
  logic signed [W-1:0] d_data = '0;
  logic                qrs_flag, beat;
  logic        [W-1:0] threshold;

  qrs_decision #(.DATA_W(W), .REFRACT(5), .LEARN(LEARN)) dut (
    .clk, .rst, .d_valid, .d_data, .qrs_flag, .beat, .threshold);

  int checks = 0, failures = 0;
  int d[N];
  bit expect_beat[N + 1];
  int beats = 0, expected = 0;
  int refr_rejected = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) d[i] = $urandom_range(0, 80) - 40;
    for (int p = 10; p + 8 < N; p += PERIOD) begin
      d[p-1] = -600; d[p] = 1000; d[p+1] = -700;
      d[p+6] = 120;  d[p+7] = 200; d[p+8] = 120;
      if (p + 1 >= LEARN) begin
        expect_beat[p+1] = 1'b1;
        expected++;
      end
    end
    d[REFR_AT+3] = 1200;
    d[ECTOPIC]   = -900;
    expect_beat[ECTOPIC+1] = 1'b1;
    expected++;

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      d_valid <= 1'b1;
      d_data  <= W'(d[i]);
      @(posedge clk);
      d_valid <= 1'b0;
      @(posedge clk);
      // One cycle after the strobe: beat pulse and flag show strobe i's verdict.
      check(beat == expect_beat[i] && qrs_flag == expect_beat[i],
            $sformatf("strobe %0d: beat=%0b flag=%0b want %0b", i, beat, qrs_flag, expect_beat[i]));
      if (beat) beats++;
      if (i == REFR_AT + 4 && !beat) refr_rejected++;
      if (i == LEARN) check(threshold == W'(1000 / 4), $sformatf("threshold after learning %0d", threshold));
      repeat (3) @(posedge clk);
      check(qrs_flag == expect_beat[i] && !beat, $sformatf("flag held after strobe %0d", i));
    end
    check(beats == expected, $sformatf("%0d beats, want %0d", beats, expected));
    check(refr_rejected == 1, "refractory spike rejected");
    $display("beats=%0d refractory_rejections=%0d final_threshold=%0d", beats, refr_rejected, threshold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
