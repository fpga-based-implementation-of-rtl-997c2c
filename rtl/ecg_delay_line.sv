// ecg_delay_line: delays the original ECG sample stream by DEPTH samples so
// that it lines up with the baseline estimate coming out of the wavelet
// decomposition and reconstruction path.
//
// It is a circular buffer in a DEPTH-word memory (one read and one write per
// sample, suited to a block RAM) with a single pointer: on every in_valid the
// word at the pointer, written DEPTH samples earlier, is read out and the new
// sample overwrites it. Until the buffer has been filled once the output is 0,
// so the memory needs no clearing at reset: the delayed signal starts from an
// all-zero history, like the filters.
//
// Interface and timing: one-cycle in_valid strobe with in_data; out_data
// changes one cycle later to the sample that entered DEPTH strobes before and
// then holds. The original design states only that the ECG is delayed by the time
// response of the two filter banks; the memory organisation is this design's.
module ecg_delay_line #(
  parameter int W     = 16,
  parameter int DEPTH = 889
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic signed [W-1:0] out_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic signed [W-1:0] mem [DEPTH];
  logic [AW-1:0]       ptr;
  logic                filled;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem[ptr] <= in_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr      <= '0;
      filled   <= 1'b0;
      out_data <= '0;
    end else if (in_valid) begin
      out_data <= filled ? mem[ptr] : '0;
      if (ptr == AW'(DEPTH - 1)) begin
        ptr    <= '0;
        filled <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

endmodule
