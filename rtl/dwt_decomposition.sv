// dwt_decomposition: the shared multi-level wavelet decomposition of the ECG.
//
// LEVELS analysis levels (dwt_analysis_level) are cascaded, each taking the
// approximation of the previous one, as in the Mallat pyramid algorithm. With
// the ECG sampled at 200 Hz, level j covers 0 .. 100/2^j Hz in its
// approximation and 100/2^j .. 100/2^(j-1) Hz in its detail. Two bands are
// brought out: the approximation of the last level (a7, 0 - 0.78 Hz), which is
// the baseline-wander estimate, and the detail of level DETAIL_LEVEL (d3,
// 12.5 - 25 Hz), which carries most of the QRS energy. One decomposition serves
// both tasks, as the original design proposes. The number of levels, the two chosen
// bands and the db4 filters are the original design's; word widths are this
// design's.
//
// Interface and timing: x_valid is a one-cycle strobe per ECG sample (the
// 200 Hz sample clock enable), x_data the signed sample. Level j produces one
// output per 2^j input samples, j cycles after the x_valid strobe of input
// sample 2^j*m, so x_valid strobes must be at least LEVELS+1 cycles apart.
// a_valid/a_data and d_valid/d_data are the outputs of the two chosen levels
// (strobe plus held value).
module dwt_decomposition
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET      = DB4,
  parameter int       IN_W         = 16,
  parameter int       DATA_W       = 24,
  parameter int       LEVELS       = 7,
  parameter int       DETAIL_LEVEL = 3
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [IN_W-1:0]   x_data,
  output logic                     a_valid,
  output logic signed [DATA_W-1:0] a_data,
  output logic                     d_valid,
  output logic signed [DATA_W-1:0] d_data
);

  // Stream of each level: index 0 is the input, index j the level-j output.
  logic                     v  [LEVELS+1];
  logic signed [DATA_W-1:0] ap [LEVELS+1];
  logic signed [DATA_W-1:0] dt [LEVELS+1];

  assign v[0]  = x_valid;
  assign ap[0] = DATA_W'(x_data);
  assign dt[0] = '0;

  for (genvar j = 1; j <= LEVELS; j++) begin : g_level
    dwt_analysis_level #(
      .WAVELET (WAVELET),
      .DATA_W  (DATA_W)
    ) u_level (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (v[j-1]),
      .in_data   (ap[j-1]),
      .out_valid (v[j]),
      .a_data    (ap[j]),
      .d_data    (dt[j])
    );
  end

  assign a_valid = v[LEVELS];
  assign a_data  = ap[LEVELS];
  assign d_valid = v[DETAIL_LEVEL];
  assign d_data  = dt[DETAIL_LEVEL];

endmodule
