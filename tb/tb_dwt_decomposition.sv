// tb_dwt_decomposition: checks the 7-level decomposition at its defaults.
// 16-bit random ECG-like samples (random walk plus noise) are applied one per
// 20 cycles. Every a7 and d3 output is compared with the reference pyramid
// (seven low-pass levels; two low-pass levels then the high-pass one), the
// counts must be N/128 and N/8 (rounded up), and a7 must come exactly 7 cycles
// and d3 exactly 3 cycles after the strobe of sample 128*m or 8*m.
module tb_dwt_decomposition;
  import dwt_pkg::*;
  import tb_dwt_ref::*;

  localparam int IN_W = 16;
  localparam int W    = 24;
  localparam int N    = 128 * 12 + 5;
  localparam int GAP  = 20;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                   x_valid = 1'b0;
  logic signed [IN_W-1:0] x_data = '0;
  logic                   a_valid, d_valid;
  logic signed [W-1:0]    a_data, d_data;

  dwt_decomposition dut (.clk, .rst, .x_valid, .x_data, .a_valid, .a_data, .d_valid, .d_data);

  int checks = 0, failures = 0;
  seq_t x, ea, ed;
  int na = 0, nd = 0;
  int cyc = 0;           // cycles since the last strobe (0 in the strobe cycle)
  int idx = -1;          // index of the last strobed sample

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (a_valid) begin
      check(na < ea.size() && a_data == W'(ea[na]), $sformatf("a7[%0d] = %0d", na, a_data));
      check(cyc == 7 && idx == 128 * na, $sformatf("a7[%0d] timing %0d/%0d", na, cyc, idx));
      na++;
    end
    if (d_valid) begin
      check(nd < ed.size() && d_data == W'(ed[nd]), $sformatf("d3[%0d] = %0d", nd, d_data));
      check(cyc == 3 && idx == 8 * nd, $sformatf("d3[%0d] timing %0d/%0d", nd, cyc, idx));
      nd++;
    end
    cyc <= x_valid ? 1 : cyc + 1;
    if (x_valid) idx <= idx + 1;
  end

  initial begin
    seq_t t;
    longint walk;
    walk = 0;
    for (int i = 0; i < N; i++) begin
      walk += $signed(5'($urandom));
      if (walk > 20000) walk = 20000;
      if (walk < -20000) walk = -20000;
      x.push_back(walk + $signed(9'($urandom)));
    end
    if ($urandom_range(0, 1) == 0) x[100] = 32767;
    t = x;
    for (int j = 1; j <= 7; j++) begin
      if (j == 3) ed = analyse(t, 1'b0, 1, W);
      t = analyse(t, 1'b0, 0, W);
    end
    ea = t;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      x_valid <= 1'b1;
      x_data  <= IN_W'(x[i]);
      @(posedge clk);
      x_valid <= 1'b0;
      repeat (GAP - 1) @(posedge clk);
    end
    repeat (GAP) @(posedge clk);
    check(na == (N + 127) / 128, $sformatf("a7 count %0d", na));
    check(nd == (N + 7) / 8, $sformatf("d3 count %0d", nd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GAP * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
