// tb_dwt_ref: reference model for the testbenches of the DWT ECG core.
//
// Plain textbook filter-bank arithmetic on queues of integers, written
// independently of the RTL: the four filters of each wavelet are typed in as
// tables (Q1.15, rounded from the published Daubechies coefficients), the
// convolutions are direct sums, and results are scaled by floor(sum / 2^15)
// and saturated to the data width, which is the number format the core uses.
package tb_dwt_ref;

  localparam int FRAC = 15;

  // Daubechies-4 (8 taps)
  localparam longint DB4_LO_D [8] = '{-347, 1078, 1011, -6129, -917, 20673, 23424, 7549};
  localparam longint DB4_HI_D [8] = '{-7549, 23424, -20673, -917, 6129, 1011, -1078, -347};
  localparam longint DB4_LO_R [8] = '{7549, 23424, 20673, -917, -6129, 1011, 1078, -347};
  // Daubechies-2 (4 taps)
  localparam longint DB2_LO_D [4] = '{-4240, 7345, 27411, 15826};
  localparam longint DB2_HI_D [4] = '{-15826, 27411, -7345, -4240};
  localparam longint DB2_LO_R [4] = '{15826, 27411, 7345, -4240};

  typedef longint seq_t[$];

  function automatic longint sat(longint v, int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  // Arithmetic shift right = floor division by 2^FRAC.
  function automatic longint scale(longint acc, int w);
    return sat(acc >>> FRAC, w);
  endfunction

  function automatic longint cf(bit db2, int f, int k);
    // f: 0 = Lo_D, 1 = Hi_D, 2 = Lo_R
    if (!db2) return (f == 0) ? DB4_LO_D[k] : (f == 1) ? DB4_HI_D[k] : DB4_LO_R[k];
    return (f == 0) ? DB2_LO_D[k] : (f == 1) ? DB2_HI_D[k] : DB2_LO_R[k];
  endfunction

  // One decomposition level: out[m] = sum_k h[k] x[2m-k], m = 0 .. (N-1)/2.
  function automatic seq_t analyse(seq_t x, bit db2, int f, int w);
    seq_t y;
    int   l;
    l = db2 ? 4 : 8;
    for (int m = 0; 2 * m < x.size(); m++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < l; k++)
        if (2 * m - k >= 0) acc += cf(db2, f, k) * x[2*m-k];
      y.push_back(scale(acc, w));
    end
    return y;
  endfunction

  // One reconstruction level: zero-insertion up-sampling, then Lo_R.
  function automatic seq_t synthesise(seq_t r, bit db2, int w);
    seq_t y;
    int   l;
    l = db2 ? 4 : 8;
    for (int n = 0; n < 2 * r.size(); n++) begin
      longint acc;
      acc = 0;
      for (int k = 0; k < l; k++)
        if (n - k >= 0 && (n - k) % 2 == 0) acc += cf(db2, 2, k) * r[(n-k)/2];
      y.push_back(scale(acc, w));
    end
    return y;
  endfunction

endpackage
