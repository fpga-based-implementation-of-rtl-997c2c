// dwt_pkg: types, constants and filter coefficients shared by the DWT ECG
// pre-processor.
//
// The filter bank is built from the Daubechies wavelet of order 4 ("db4",
// 8 taps), the main configuration; the 4-tap "db2" bank is also provided as a
// lighter alternative for small devices. Only the scaling (synthesis low-pass)
// filter Lo_R is tabulated; the other three follow the usual orthogonal
// quadrature-mirror relations for an even length L:
//   Lo_D[k] = Lo_R[L-1-k]
//   Hi_R[k] = (-1)^k     * Lo_D[k]
//   Hi_D[k] = (-1)^(k+1) * Lo_R[k]
// which give the same four filters as the common wavelet toolboxes.
// Coefficients are signed Q1.15 numbers: round(c * 2^15).
package dwt_pkg;

  typedef enum logic [0:0] {
    DB4 = 1'b0,   // 8-tap Daubechies-4, main configuration
    DB2 = 1'b1    // 4-tap Daubechies-2, reduced-size variant
  } wavelet_e;

  typedef enum logic [1:0] {
    LO_D = 2'd0,  // decomposition low-pass
    HI_D = 2'd1,  // decomposition high-pass
    LO_R = 2'd2,  // reconstruction low-pass
    HI_R = 2'd3   // reconstruction high-pass
  } filter_e;

  localparam int COEF_W    = 16;
  localparam int COEF_FRAC = 15;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Number of taps of each wavelet's filters.
  function automatic int taps(wavelet_e w);
    return (w == DB4) ? 8 : 4;
  endfunction

  localparam int MAX_TAPS = 8;

  typedef coef_t coefs_t [MAX_TAPS];

  // Scaling filters Lo_R in Q1.15; unused entries are zero.
  localparam coefs_t DB4_LO_R = '{
    16'sd7549,    // 0.2303778133
    16'sd23424,   // 0.7148465706
    16'sd20673,   // 0.6308807679
    -16'sd917,    // -0.0279837694
    -16'sd6129,   // -0.1870348117
    16'sd1011,    // 0.0308413818
    16'sd1078,    // 0.0328830117
    -16'sd347     // -0.0105974018
  };
  localparam coefs_t DB2_LO_R = '{
    16'sd15826,   // 0.4829629131
    16'sd27411,   // 0.8365163037
    16'sd7345,    // 0.2241438680
    -16'sd4240,   // -0.1294095226
    16'sd0, 16'sd0, 16'sd0, 16'sd0
  };

  // All taps of filter f of wavelet w (entries from taps(w) on are zero).
  // Meant for elaboration time: assign the result to a localparam.
  function automatic coefs_t coefs(wavelet_e w, filter_e f);
    coefs_t r, s;
    int     l;
    s = (w == DB4) ? DB4_LO_R : DB2_LO_R;
    l = taps(w);
    r = '{default: '0};
    for (int k = 0; k < l; k++) begin
      case (f)
        LO_D:    r[k] = s[l-1-k];
        HI_D:    r[k] = (k % 2 == 0) ? -s[k] : s[k];
        LO_R:    r[k] = s[k];
        default: r[k] = (k % 2 == 0) ? s[l-1-k] : -s[l-1-k];
      endcase
    end
    return r;
  endfunction

  // Saturate a wide signed accumulator, already scaled, to a DATA_W result.
  // Written for widths up to 64 bits.
  function automatic logic signed [63:0] sat64(logic signed [63:0] v, int data_w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (data_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (data_w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
