// dwt_synthesis_level: one level of wavelet reconstruction for the
// approximation path: up-sampling by 2 followed by the reconstruction
// low-pass filter Lo_R.
//
// Up-sampling inserts a zero after every input sample, so each input r[m]
// yields two outputs that only use every second filter tap (polyphase form):
//   y[2m]   = sum_i Lo_R[2i]   * r[m-i]
//   y[2m+1] = sum_i Lo_R[2i+1] * r[m-i]
// Both are computed when r[m] arrives, from a TAPS/2 deep input history, with
// r[i] = 0 before the first input. The even output is issued at once; the odd
// one is held and issued HOLD_TICKS base-rate ticks later, so that a cascade of
// levels delivers its samples evenly spaced at the output rate. For the level
// that turns a_j into a_(j-1), HOLD_TICKS = 2^(j-1) ticks of the input sample
// rate of the whole filter bank.
//
// Arithmetic as in dwt_analysis_level: Q1.15 coefficients, shift right by 15
// (rounding down), saturation to DATA_W bits.
//
// Interface and timing: tick is the base sample-rate strobe (one per ECG
// sample). in_valid/in_data is the coarse input. out_valid pulses one cycle
// after in_valid (even sample) and one cycle after the HOLD_TICKS-th tick that
// follows (odd sample); out_data holds between strobes. A new input must not
// arrive while an odd sample is still held (asserted). The hold scheme is this
// design's choice; the original design specifies only up-sampling and filtering.
module dwt_synthesis_level
  import dwt_pkg::*;
#(
  parameter wavelet_e WAVELET    = DB4,
  parameter int       DATA_W     = 24,
  parameter int       HOLD_TICKS = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     tick,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  localparam int TAPS  = taps(WAVELET);
  localparam int HALF  = TAPS / 2;
  localparam int CNT_W = $clog2(HOLD_TICKS + 1);
  localparam coefs_t C_LO = coefs(WAVELET, LO_R);

  logic signed [DATA_W-1:0] hist [HALF-1];   // hist[i] holds r[m-1-i]
  logic signed [DATA_W-1:0] held;            // odd-phase sample waiting
  logic                     pending;
  logic [CNT_W-1:0]         cnt;
  logic signed [63:0]       acc_even, acc_odd;

  always_comb begin
    acc_even = 64'(C_LO[0]) * 64'(in_data);
    acc_odd  = 64'(C_LO[1]) * 64'(in_data);
    for (int i = 1; i < HALF; i++) begin
      acc_even += 64'(C_LO[2*i])   * 64'(hist[i-1]);
      acc_odd  += 64'(C_LO[2*i+1]) * 64'(hist[i-1]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < HALF - 1; i++) hist[i] <= '0;
      held      <= '0;
      pending   <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        hist[0] <= in_data;
        for (int i = 1; i < HALF - 1; i++) hist[i] <= hist[i-1];
        out_data  <= DATA_W'(sat64(acc_even >>> COEF_FRAC, DATA_W));
        out_valid <= 1'b1;
        held      <= DATA_W'(sat64(acc_odd >>> COEF_FRAC, DATA_W));
        pending   <= 1'b1;
        cnt       <= '0;
      end else if (tick && pending) begin
        if (cnt == CNT_W'(HOLD_TICKS - 1)) begin
          out_data  <= held;
          out_valid <= 1'b1;
          pending   <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // An input may only arrive once the previous odd sample has been issued.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 in_valid |-> !pending)
    else $error("dwt_synthesis_level: input arrived while a sample was held");

endmodule
