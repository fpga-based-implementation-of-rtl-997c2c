// blw_canceller: baseline-wander removal from the level-LEVELS approximation.
//
// Instead of rebuilding the whole ECG from every band except a7, only a7 is
// reconstructed, through LEVELS cascaded up-sample-and-Lo_R levels
// (dwt_synthesis_level), and the result, the baseline estimate blw[n], is
// subtracted from the original ECG delayed by the time response of the two
// filter banks. For orthogonal filters of length L that response is
// (2^LEVELS - 1)*(L - 1) samples, 889 for db4 at 7 levels, so
//   ecg_delayed[n] = x[n - DELAY]
//   blw[n]         = a7 reconstructed at the full rate
//   ecg_clean[n]   = ecg_delayed[n] - blw[n]
// The reconstruction levels hand their odd-phase samples on after 2^(j-1)
// ticks (see dwt_synthesis_level), so one output appears per x_valid strobe,
// in the same sample period, with no extra sample latency.
//
// The structure (a7-only reconstruction, delayed original, subtraction) is the
// original design's; the value of the delay, derived from the filter length, and the
// output timing are this design's.
//
// Interface and timing: x_valid/x_data is the ECG sample strobe (also the
// base tick of the reconstruction). a_valid/a_data comes from the
// decomposition (one per 2^LEVELS samples, a few cycles after the strobe of
// sample 2^LEVELS*m). out_valid pulses once per ECG sample, at most
// 2*LEVELS+2 cycles after its x_valid; the outputs hold between strobes.
module blw_canceller
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET = DB4,
  parameter int       IN_W    = 16,
  parameter int       DATA_W  = 24,
  parameter int       LEVELS  = 7
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [IN_W-1:0]   x_data,
  input  logic                     a_valid,
  input  logic signed [DATA_W-1:0] a_data,
  output logic                     out_valid,
  output logic signed [IN_W-1:0]   ecg_delayed,
  output logic signed [DATA_W-1:0] blw,
  output logic signed [DATA_W-1:0] ecg_clean
);

  localparam int DELAY = ((1 << LEVELS) - 1) * (taps(WAVELET) - 1);

  // r[j] is the approximation of level j rebuilt from a_LEVELS; r[0] is blw.
  logic                     rv [LEVELS+1];
  logic signed [DATA_W-1:0] rd [LEVELS+1];
  logic signed [IN_W-1:0]   x_del;

  assign rv[LEVELS] = a_valid;
  assign rd[LEVELS] = a_data;

  for (genvar j = LEVELS; j >= 1; j--) begin : g_level
    dwt_synthesis_level #(
      .WAVELET    (WAVELET),
      .DATA_W     (DATA_W),
      .HOLD_TICKS (1 << (j - 1))
    ) u_level (
      .clk       (clk),
      .rst       (rst),
      .tick      (x_valid),
      .in_valid  (rv[j]),
      .in_data   (rd[j]),
      .out_valid (rv[j-1]),
      .out_data  (rd[j-1])
    );
  end

  ecg_delay_line #(
    .W     (IN_W),
    .DEPTH (DELAY)
  ) u_delay (
    .clk      (clk),
    .rst      (rst),
    .in_valid (x_valid),
    .in_data  (x_data),
    .out_data (x_del)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      ecg_delayed <= '0;
      blw         <= '0;
      ecg_clean   <= '0;
    end else begin
      out_valid <= rv[0];
      if (rv[0]) begin
        ecg_delayed <= x_del;
        blw         <= rd[0];
        ecg_clean   <= DATA_W'(x_del) - rd[0];
      end
    end
  end

endmodule
