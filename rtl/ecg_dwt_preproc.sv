// ecg_dwt_preproc: ECG pre-processing core based on the discrete wavelet
// transform. It removes baseline wander (BLW) from the ECG and detects QRS
// complexes, both from one shared 7-level Daubechies-4 decomposition.
//
//   ecg_in --> dwt_decomposition --a7--> blw_canceller --> ecg_clean, blw
//      |                        \--d3--> qrs_decision  --> qrs_flag, beat
//      \------------------------------->  (delayed original inside blw_canceller)
//
// At 200 Hz sampling, a7 holds 0 - 0.78 Hz, the band of baseline wander, and
// d3 holds 12.5 - 25 Hz, where the QRS energy is. The BLW path rebuilds only a7
// and subtracts it from the ECG delayed by the filter banks' response
// (889 samples, 4.445 s at 200 Hz, for db4 and 7 levels). The QRS path
// applies an adaptive threshold with heuristic rules to |d3|.
// The partition and the band choice are the original design's; word widths, output
// timing and the detailed QRS rules are this design's.
//
// Interface and timing: ecg_valid is a one-cycle strobe per ECG sample (the
// sample-rate clock enable of the core clock), at least MIN_GAP cycles apart
// (asserted); ecg_in is a signed IN_W-bit sample. out_valid pulses once per
// sample, within 2*LEVELS+2 cycles of ecg_valid, with ecg_delayed =
// ecg_in 889 samples earlier, blw = the baseline estimate for that sample and
// ecg_clean = ecg_delayed - blw. qrs_flag is high for one d3 period (8 samples)
// after each detected beat, beat pulses once per beat. d3_valid/d3_data expose
// the detail band. Synchronous active-high reset.
module ecg_dwt_preproc
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET      = DB4,
  parameter int       IN_W         = 16,
  parameter int       DATA_W       = 24,
  parameter int       LEVELS       = 7,
  parameter int       DETAIL_LEVEL = 3,
  parameter int       REFRACT      = 5,
  parameter int       LEARN        = 50
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ecg_valid,
  input  logic signed [IN_W-1:0]   ecg_in,
  output logic                     out_valid,
  output logic signed [IN_W-1:0]   ecg_delayed,
  output logic signed [DATA_W-1:0] blw,
  output logic signed [DATA_W-1:0] ecg_clean,
  output logic                     d3_valid,
  output logic signed [DATA_W-1:0] d3_data,
  output logic                     qrs_flag,
  output logic                     beat,
  output logic        [DATA_W-1:0] qrs_threshold
);

  localparam int MIN_GAP = 2 * LEVELS + 3;

  logic                     a_valid;
  logic signed [DATA_W-1:0] a_data;

  dwt_decomposition #(
    .WAVELET      (WAVELET),
    .IN_W         (IN_W),
    .DATA_W       (DATA_W),
    .LEVELS       (LEVELS),
    .DETAIL_LEVEL (DETAIL_LEVEL)
  ) u_decomp (
    .clk     (clk),
    .rst     (rst),
    .x_valid (ecg_valid),
    .x_data  (ecg_in),
    .a_valid (a_valid),
    .a_data  (a_data),
    .d_valid (d3_valid),
    .d_data  (d3_data)
  );

  blw_canceller #(
    .WAVELET (WAVELET),
    .IN_W    (IN_W),
    .DATA_W  (DATA_W),
    .LEVELS  (LEVELS)
  ) u_blw (
    .clk         (clk),
    .rst         (rst),
    .x_valid     (ecg_valid),
    .x_data      (ecg_in),
    .a_valid     (a_valid),
    .a_data      (a_data),
    .out_valid   (out_valid),
    .ecg_delayed (ecg_delayed),
    .blw         (blw),
    .ecg_clean   (ecg_clean)
  );

  qrs_decision #(
    .DATA_W  (DATA_W),
    .REFRACT (REFRACT),
    .LEARN   (LEARN)
  ) u_qrs (
    .clk       (clk),
    .rst       (rst),
    .d_valid   (d3_valid),
    .d_data    (d3_data),
    .qrs_flag  (qrs_flag),
    .beat      (beat),
    .threshold (qrs_threshold)
  );

  // Sample strobes must leave the pipelines time to settle.
  logic [$clog2(MIN_GAP+1)-1:0] gap;
  always_ff @(posedge clk) begin
    if (rst)                       gap <= '0;
    else if (ecg_valid)            gap <= '0;
    else if (gap != MIN_GAP[$bits(gap)-1:0]) gap <= gap + 1'b1;
  end

  logic seen_sample;
  always_ff @(posedge clk) begin
    if (rst)            seen_sample <= 1'b0;
    else if (ecg_valid) seen_sample <= 1'b1;
  end

  a_sample_gap: assert property (@(posedge clk) disable iff (rst)
                                 (ecg_valid && seen_sample) |-> (gap >= MIN_GAP[$bits(gap)-1:0] - 1))
    else $error("ecg_dwt_preproc: ecg_valid strobes closer than MIN_GAP cycles");

endmodule
