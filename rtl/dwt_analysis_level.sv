// dwt_analysis_level: one level of the Mallat (pyramid) wavelet decomposition.
//
// The incoming approximation stream is filtered by the decomposition low-pass
// Lo_D and high-pass Hi_D FIR filters of the chosen Daubechies wavelet and both
// results are down-sampled by 2. Each input sample is shifted into a TAPS-1 deep
// delay line; the current input plus the delay line form the filter taps, so
// both filters are computed in parallel, combinationally, in the cycle that
// the input is valid. Only every second input (the 1st, 3rd, 5th, ... after
// reset) produces an output, so
//   a[m] = sum_k Lo_D[k] * x[2m-k],   d[m] = sum_k Hi_D[k] * x[2m-k]
// with x[i] = 0 before the first input.
//
// Arithmetic: Q1.15 coefficients, full-precision sum of products, then an
// arithmetic right shift by 15 (rounding towards minus infinity) and
// saturation to DATA_W bits. The word widths and the rounding are this
// design's choice.
//
// Interface and timing: in_valid is a one-cycle strobe with in_data. When it
// leads to an output, out_valid pulses one cycle later with a_data (the
// approximation) and d_data (the detail), which then hold until the next
// output. Synchronous, active-high reset clears the delay line and the
// decimation phase.
module dwt_analysis_level
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET = DB4,
  parameter int       DATA_W  = 24
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] a_data,
  output logic signed [DATA_W-1:0] d_data
);

  localparam int     TAPS = taps(WAVELET);
  localparam coefs_t C_LO = coefs(WAVELET, LO_D);
  localparam coefs_t C_HI = coefs(WAVELET, HI_D);

  logic signed [DATA_W-1:0] dl [TAPS-1];   // dl[i] holds x[n-1-i]
  logic                     phase;         // 0: this input is kept
  logic signed [63:0]       acc_lo, acc_hi;

  always_comb begin
    acc_lo = 64'(C_LO[0]) * 64'(in_data);
    acc_hi = 64'(C_HI[0]) * 64'(in_data);
    for (int k = 1; k < TAPS; k++) begin
      acc_lo += 64'(C_LO[k]) * 64'(dl[k-1]);
      acc_hi += 64'(C_HI[k]) * 64'(dl[k-1]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TAPS - 1; i++) dl[i] <= '0;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      a_data    <= '0;
      d_data    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dl[0] <= in_data;
        for (int i = 1; i < TAPS - 1; i++) dl[i] <= dl[i-1];
        phase <= ~phase;
        if (!phase) begin
          a_data    <= DATA_W'(sat64(acc_lo >>> COEF_FRAC, DATA_W));
          d_data    <= DATA_W'(sat64(acc_hi >>> COEF_FRAC, DATA_W));
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
