// selftest_pkg: global constants and shared types of the BLM self-test
// (gain / phase extractor).
//
// Every size of the design is set here and propagated to the blocks as a
// module parameter, so the whole functionality can be re-targeted by editing
// this one file. The values are those of the four-channel test
// configuration: running sum 7, 40-bit running-sum buses, a 16-bit
// reference, 16-bit division operands, 4 channels and 6 fractional result
// bits. The filter fixed-point formats (data sfixed(21 downto -14),
// coefficients sfixed(1 downto -18)) and the input frequency of 0.153 Hz are
// also the documented ones.
//
// The Butterworth coefficients are derived here at elaboration time from the
// input frequency and the running-sum update period, with the cut-off one
// octave above the input frequency (wc = 2*pi*2*F), followed by the bilinear
// transform and normalisation by C. The rounding of a real coefficient to
// the coefficient format (round half away from zero, with saturation) is
// this design's choice.
package selftest_pkg;

  // ---------------- global design parameters ----------------
  localparam int unsigned RUNNING_SUM_NUMBER   = 7;   // running sum the test uses
  localparam int unsigned NUM_RUNNING_SUMS     = 12;  // running sums per channel
  localparam int unsigned NUM_RS_ENABLES       = 6;   // one enable per pair of sums
  localparam int unsigned CHANNEL_DATA_WIDTH   = 40;  // running-sum (decoder output) width
  localparam int unsigned REFERENCE_DATA_WIDTH = 16;  // reference ADC width
  localparam int unsigned INTERNAL_DATA_WIDTH  = 16;  // division operand width
  localparam int unsigned NUM_CHANNELS         = 4;   // channels tested in turn
  localparam int unsigned OUTPUT_DECIMALS      = 6;   // fractional bits of gain / phase

  // ---------------- filter fixed-point formats ----------------
  localparam int FILTER_INTERNAL_MSB = 21;
  localparam int FILTER_INTERNAL_LSB = -14;
  localparam int FILTER_COEF_MSB     = 1;
  localparam int FILTER_COEF_LSB     = -18;

  // input frequency applied to the chain, Hz
  localparam real INPUT_FREQUENCY = 0.153;

  // running-sum update period of each of the 12 sums, seconds
  localparam real RS_UPDATES [NUM_RUNNING_SUMS] = '{
    0.00004, 0.00004, 0.00004, 0.00004, 0.00008, 0.00008,
    0.00256, 0.00256, 0.08192, 0.08192, 0.65536, 0.65536};

  localparam real MATH_PI = 3.14159265358979323846;

  // ---------------- error codes (on the result buses) ----------------
  // "100..0" channel counter overflow, "110..0" reference counter overflow,
  // "111..0" division by zero. Built for any result width by these helpers.
  typedef enum logic [1:0] {
    ERR_CHANNEL_OVERFLOW   = 2'd0,
    ERR_REFERENCE_OVERFLOW = 2'd1,
    ERR_DIVIDE_BY_ZERO     = 2'd2
  } err_kind_e;

  // Butterworth coefficient set, in units of 2**FILTER_COEF_LSB
  typedef struct packed {
    logic signed [31:0] na1;  // x(n)   weight, 1/C
    logic signed [31:0] na2;  // x(n-1) weight, 2/C
    logic signed [31:0] na3;  // x(n-2) weight, 1/C
    logic signed [31:0] nb1;  // y(n-1) weight, b1/C
    logic signed [31:0] nb2;  // y(n-2) weight, b2/C
  } coef_set_t;

  // real -> signed fixed point with FRAC fractional bits and WIDTH total bits,
  // rounded half away from zero and saturated to the format
  function automatic longint to_fixed(real v, int frac, int width);
    real    scaled;
    longint r, maxv, minv;
    scaled = v * (2.0 ** frac);
    if (scaled >= 0.0) r = longint'($floor(scaled + 0.5));
    else               r = -longint'($floor(-scaled + 0.5));
    maxv = (longint'(1) <<< (width - 1)) - 1;
    minv = -(longint'(1) <<< (width - 1));
    if (r > maxv) r = maxv;
    if (r < minv) r = minv;
    return r;
  endfunction

  // Coefficients of the second-order Butterworth low-pass, bilinear
  // transform, cut-off at 2*F, sampled every Ts seconds.
  function automatic coef_set_t butterworth_coefs(real f_in, real ts, int coef_msb, int coef_lsb);
    real wc, k, c, b1, b2;
    int  w, fr;
    coef_set_t cs;
    w  = coef_msb - coef_lsb + 1;
    fr = -coef_lsb;
    wc = (2.0 * MATH_PI) * (2.0 * f_in);
    k  = ts * wc;
    c  = 1.0 + ((2.0 * $sqrt(2.0)) / k) + (4.0 / (k * k));
    b1 = 2.0 - (8.0 / (k * k));
    b2 = 1.0 - ((2.0 * $sqrt(2.0)) / k) + (4.0 / (k * k));
    cs.na1 = 32'(to_fixed(1.0 / c, fr, w));
    cs.na2 = 32'(to_fixed(2.0 / c, fr, w));
    cs.na3 = 32'(to_fixed(1.0 / c, fr, w));
    cs.nb1 = 32'(to_fixed(b1 / c, fr, w));
    cs.nb2 = 32'(to_fixed(b2 / c, fr, w));
    return cs;
  endfunction

endpackage
