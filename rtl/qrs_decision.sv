// qrs_decision: decision stage of the QRS detector. It turns the level-3
// wavelet detail d3 (12.5 - 25 Hz band, one sample per 8 ECG samples) into a
// logic QRS flag using an adaptive threshold and a small set of heuristic
// rules.
//
// The original design names the method (adaptive thresholding plus heuristic rules)
// but not its details; the rules below are this design's, in the style of
// classic running-estimate QRS detectors:
//   1. Feature: e[m] = |d3[m]|.
//   2. Candidate: a local maximum, e[m-1] > e[m-2] and e[m-1] >= e[m].
//   3. Learning: for the first LEARN d3 samples no beat is reported; the
//      signal-peak level SPK is set to the largest candidate seen, NPK stays 0.
//      Candidates that would have been beats (rule 5) still start the
//      refractory period, so a QRS that straddles the end of learning is not
//      reported late.
//   4. Threshold: THR = NPK + (SPK - NPK)/4.
//   5. A candidate above THR, at least REFRACT d3 samples after the previous
//      beat (refractory period, 200 ms at 25 Hz), is a QRS:
//      SPK += (peak - SPK)/8. Any other candidate is noise:
//      NPK += (peak - NPK)/8.
// Divisions are arithmetic right shifts.
//
// Interface and timing: d_valid/d_data is the d3 stream. On the d_valid strobe
// that confirms a peak, beat pulses for one cycle (a cycle later) and qrs_flag
// goes high until the next d_valid strobe, i.e. for one d3 sample period
// (8 ECG samples, 40 ms at 200 Hz). The peak lies one d3 sample before the
// strobe that reports it. threshold shows the current THR.
module qrs_decision #(
  parameter int DATA_W  = 24,
  parameter int REFRACT = 5,
  parameter int LEARN   = 50
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     d_valid,
  input  logic signed [DATA_W-1:0] d_data,
  output logic                     qrs_flag,
  output logic                     beat,
  output logic        [DATA_W-1:0] threshold
);

  localparam int CW = $clog2(((REFRACT > LEARN) ? REFRACT : LEARN) + 2);

  logic        [DATA_W-1:0] e, e1, e2;   // |d3| now, one and two samples back
  logic        [DATA_W-1:0] spk, npk;
  logic        [DATA_W-1:0] thr;
  logic        [CW-1:0]     learn_cnt;   // d3 samples seen while learning
  logic        [CW-1:0]     since;       // d3 samples since the last beat
  logic                     learning;
  logic                     is_peak, is_cand, is_qrs;
  logic signed [DATA_W:0]   dspk, dnpk;  // peak minus each running level

  always_comb begin
    e        = d_data[DATA_W-1] ? DATA_W'(-d_data) : DATA_W'(d_data);
    thr      = npk + ((spk - npk) >> 2);
    learning = (learn_cnt != CW'(LEARN));
    is_peak  = (e1 > e2) && (e1 >= e);
    is_cand  = is_peak && (e1 > thr) && (since >= CW'(REFRACT));
    is_qrs   = is_cand && !learning;
    dspk     = $signed({1'b0, e1}) - $signed({1'b0, spk});
    dnpk     = $signed({1'b0, e1}) - $signed({1'b0, npk});
  end

  assign threshold = thr;

  always_ff @(posedge clk) begin
    if (rst) begin
      e1        <= '0;
      e2        <= '0;
      spk       <= '0;
      npk       <= '0;
      learn_cnt <= '0;
      since     <= CW'(REFRACT);
      qrs_flag  <= 1'b0;
      beat      <= 1'b0;
    end else begin
      beat <= 1'b0;
      if (d_valid) begin
        e1 <= e;
        e2 <= e1;
        qrs_flag <= is_qrs;
        beat     <= is_qrs;
        if (learning) begin
          learn_cnt <= learn_cnt + 1'b1;
          if (is_peak && e1 > spk) spk <= e1;
        end else if (is_qrs) begin
          spk <= spk + DATA_W'(dspk >>> 3);
        end else if (is_peak) begin
          npk <= npk + DATA_W'(dnpk >>> 3);
        end
        if (is_cand) since <= '0;
        else if (since != CW'(REFRACT)) since <= since + 1'b1;
      end
    end
  end

endmodule
