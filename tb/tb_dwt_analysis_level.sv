// tb_dwt_analysis_level: checks one decomposition level, for db4 and db2.
// Random samples (including full-scale ones that saturate) are applied with
// random gaps; every approximation and detail output is compared with the
// reference filter bank, the output count must be half the input count and
// each output must follow the strobe of an even-indexed input by one cycle.
module tb_dwt_analysis_level;
  import dwt_pkg::*;
  import tb_dwt_ref::*;

  localparam int W = 24;
  localparam int N = 400;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                in_valid = 1'b0;
  logic signed [W-1:0] in_data  = '0;
  logic                v4, v2;
  logic signed [W-1:0] a4, d4, a2, d2;

  dwt_analysis_level #(.WAVELET(DB4), .DATA_W(W)) dut4 (
    .clk, .rst, .in_valid, .in_data, .out_valid(v4), .a_data(a4), .d_data(d4));
  dwt_analysis_level #(.WAVELET(DB2), .DATA_W(W)) dut2 (
    .clk, .rst, .in_valid, .in_data, .out_valid(v2), .a_data(a2), .d_data(d2));

  int checks = 0, failures = 0;
  seq_t x, ea4, ed4, ea2, ed2;
  int n4 = 0, n2 = 0;
  int in_idx = -1;      // index of the sample on in_data
  int prev_idx = -1;    // index of the sample strobed in the previous cycle
  bit prev_v = 1'b0;

  always @(posedge clk) begin
    prev_v   <= in_valid;
    prev_idx <= in_idx;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (v4) begin
      check(n4 < ea4.size() && a4 == W'(ea4[n4]) && d4 == W'(ed4[n4]),
            $sformatf("db4 output %0d: a=%0d d=%0d", n4, a4, d4));
      check(prev_v && prev_idx == 2 * n4,
            $sformatf("db4 output %0d timing", n4));
      n4++;
    end
    if (v2) begin
      check(n2 < ea2.size() && a2 == W'(ea2[n2]) && d2 == W'(ed2[n2]),
            $sformatf("db2 output %0d: a=%0d d=%0d", n2, a2, d2));
      n2++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      longint v;
      if (i % 37 == 5)      v = (i % 2) ? -(longint'(1) <<< 23) : (longint'(1) <<< 23) - 1;
      else if (i % 3 == 0)  v = longint'($signed(W'($urandom)));
      else                  v = longint'($signed(16'($urandom)));
      x.push_back(v);
    end
    ea4 = analyse(x, 1'b0, 0, W);  ed4 = analyse(x, 1'b0, 1, W);
    ea2 = analyse(x, 1'b1, 0, W);  ed2 = analyse(x, 1'b1, 1, W);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < N; i++) begin
      repeat ($urandom_range(1, 4)) @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= W'(x[i]);
      in_idx   <= i;
      @(posedge clk);
      in_valid <= 1'b0;
    end
    repeat (5) @(posedge clk);
    check(n4 == N / 2, $sformatf("db4 output count %0d", n4));
    check(n2 == N / 2, $sformatf("db2 output count %0d", n2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
