// tb_ecg_delay_line: checks the ECG delay line at its default depth (889).
// Random samples with random gaps; after each strobe the output must be the
// sample that entered DEPTH strobes earlier, or 0 while fewer than DEPTH
// samples have entered. Reset in the middle of the run must restart the
// history from zero.
module tb_ecg_delay_line;

  localparam int W     = 16;
  localparam int DEPTH = 889;
  localparam int N     = 2 * DEPTH + 300;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic                in_valid = 1'b0;
  logic signed [W-1:0] in_data = '0;
  logic signed [W-1:0] out_data;

  ecg_delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .in_valid, .in_data, .out_data);

  int checks = 0, failures = 0;
  logic signed [W-1:0] hist[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      logic signed [W-1:0] v;
      v = W'($urandom);
      hist.push_back(v);
      in_valid <= 1'b1;
      in_data  <= v;
      @(posedge clk);
      in_valid <= 1'b0;
      @(posedge clk);
      check(out_data == ((hist.size() > DEPTH) ? hist[hist.size()-1-DEPTH] : W'(0)),
            $sformatf("sample %0d: got %0d", hist.size() - 1, out_data));
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run(N);
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    hist.delete();
    run(DEPTH + 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
