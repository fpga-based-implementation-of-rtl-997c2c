// tb_dwt_synthesis_level: checks one reconstruction level (up-sample by 2,
// Lo_R) with HOLD_TICKS = 4, for db4 and db2. A base tick is given every 12
// cycles and a coarse input every 8 ticks, a few cycles after a tick, as in
// the full core. Every output is compared with the reference (zero insertion
// then convolution), the output count must be twice the input count, the even
// sample must follow its input by one cycle and the odd sample must follow the
// 4th tick after the input by one cycle.
module tb_dwt_synthesis_level;
  import dwt_pkg::*;
  import tb_dwt_ref::*;

  localparam int W    = 24;
  localparam int N    = 120;
  localparam int HOLD = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                tick = 1'b0;
  logic                in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic                v4, v2;
  logic signed [W-1:0] y4, y2;

  dwt_synthesis_level #(.WAVELET(DB4), .DATA_W(W), .HOLD_TICKS(HOLD)) dut4 (
    .clk, .rst, .tick, .in_valid, .in_data, .out_valid(v4), .out_data(y4));
  dwt_synthesis_level #(.WAVELET(DB2), .DATA_W(W), .HOLD_TICKS(HOLD)) dut2 (
    .clk, .rst, .tick, .in_valid, .in_data, .out_valid(v2), .out_data(y2));

  int checks = 0, failures = 0;
  seq_t r, e4, e2;
  int n4 = 0, n2 = 0;
  bit prev_in = 1'b0;
  bit prev_tick = 1'b0;
  int ticks_since_in = 0;   // ticks counted after the last input, up to the previous cycle

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (v4) begin
      check(n4 < e4.size() && y4 == W'(e4[n4]), $sformatf("db4 output %0d = %0d", n4, y4));
      if (n4 % 2 == 0) check(prev_in, $sformatf("even output %0d timing", n4));
      else             check(prev_tick && ticks_since_in == HOLD,
                             $sformatf("odd output %0d timing (%0d ticks)", n4, ticks_since_in));
      n4++;
    end
    if (v2) begin
      check(n2 < e2.size() && y2 == W'(e2[n2]), $sformatf("db2 output %0d = %0d", n2, y2));
      n2++;
    end
    prev_in   <= in_valid;
    prev_tick <= tick;
    if (in_valid)  ticks_since_in <= 0;
    else if (tick) ticks_since_in <= ticks_since_in + 1;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      if (i % 29 == 7) r.push_back((i % 2) ? -(longint'(1) <<< 23) : (longint'(1) <<< 23) - 1);
      else             r.push_back(longint'($signed(20'($urandom))));
    end
    e4 = synthesise(r, 1'b0, W);
    e2 = synthesise(r, 1'b1, W);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < N * 2 * HOLD + 2 * HOLD; t++) begin
      tick <= 1'b1;
      @(posedge clk);
      tick <= 1'b0;
      repeat ($urandom_range(2, 5)) @(posedge clk);
      if (t % (2 * HOLD) == 0 && t / (2 * HOLD) < N) begin
        in_valid <= 1'b1;
        in_data  <= W'(r[t / (2 * HOLD)]);
        @(posedge clk);
        in_valid <= 1'b0;
      end
      repeat (4) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    check(n4 == 2 * N, $sformatf("db4 output count %0d", n4));
    check(n2 == 2 * N, $sformatf("db2 output count %0d", n2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
