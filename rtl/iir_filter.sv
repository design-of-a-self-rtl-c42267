// iir_filter: second-order Butterworth low-pass (IIR, direct form I) that
// gives the peak-to-peak extractor a noise-free signal to compare.
//
// Recurrence, with coefficients already divided by C:
//   y(n) = na1*x(n) + na2*x(n-1) + na3*x(n-2) - nb1*y(n-1) - nb2*y(n-2)
// na1 = na3 = 1/C, na2 = 2/C, nb1 = b1/C (z^-1 term), nb2 = b2/C (z^-2 term).
// The coefficients are computed at elaboration from the input frequency
// F_IN and the sample period TS (see selftest_pkg); they can also be
// overridden through COEFS.
//
// Data are signed fixed point sfixed(D_MSB downto D_LSB) (default 36 bits,
// 14 fractional), coefficients sfixed(C_MSB downto C_LSB) (20 bits, 18
// fractional), as documented. The five products are summed at full
// precision and the sum is rounded (half up) to the data format and
// saturated, which is how the fixed-point library resizes by default; the
// single-cycle, fully parallel datapath is this design's choice.
//
// Interface: x_in is an unsigned running-sum value (integer); it is
// saturated into the integer range of the data format. On each in_valid
// pulse one sample is processed; y_int (the integer part, floored) and
// out_valid appear one clock later. hold_clear flushes the delay line.
module iir_filter #(
  parameter int unsigned IN_W  = selftest_pkg::CHANNEL_DATA_WIDTH,
  parameter int          D_MSB = selftest_pkg::FILTER_INTERNAL_MSB,
  parameter int          D_LSB = selftest_pkg::FILTER_INTERNAL_LSB,
  parameter int          C_MSB = selftest_pkg::FILTER_COEF_MSB,
  parameter int          C_LSB = selftest_pkg::FILTER_COEF_LSB,
  parameter real         F_IN  = selftest_pkg::INPUT_FREQUENCY,
  parameter real         TS    = selftest_pkg::RS_UPDATES[selftest_pkg::RUNNING_SUM_NUMBER],
  parameter selftest_pkg::coef_set_t COEFS =
      selftest_pkg::butterworth_coefs(F_IN, TS, C_MSB, C_LSB),
  localparam int         DW    = D_MSB - D_LSB + 1,     // data word
  localparam int         IW    = D_MSB + 1               // integer bits (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic [IN_W-1:0]      x_in,
  output logic signed [IW-1:0] y_int,
  output logic signed [DW-1:0] y_fix,
  output logic                 out_valid
);
  localparam int CW   = C_MSB - C_LSB + 1;
  localparam int DF   = -D_LSB;                 // data fractional bits
  localparam int CF   = -C_LSB;                 // coefficient fractional bits
  localparam int PW   = DW + CW;                // product width
  localparam int AW   = PW + 3;                 // accumulator (5 terms)

  localparam logic signed [CW-1:0] NA1 = CW'(COEFS.na1);
  localparam logic signed [CW-1:0] NA2 = CW'(COEFS.na2);
  localparam logic signed [CW-1:0] NA3 = CW'(COEFS.na3);
  localparam logic signed [CW-1:0] NB1 = CW'(COEFS.nb1);
  localparam logic signed [CW-1:0] NB2 = CW'(COEFS.nb2);

  localparam logic signed [DW-1:0] DMAX = {1'b0, {(DW-1){1'b1}}};
  localparam logic signed [DW-1:0] DMIN = {1'b1, {(DW-1){1'b0}}};

  logic signed [DW-1:0] x0, x1, x2, y1, y2;
  logic signed [AW-1:0] acc, acc_rnd;
  logic signed [AW-1:0] q;
  logic signed [DW-1:0] y_new;

  // input conversion: unsigned integer -> sfixed, saturating at the top
  always_comb begin
    if (IN_W >= IW && |(x_in >> (IW - 1)))
      x0 = DMAX;
    else
      x0 = DW'({x_in, {DF{1'b0}}});
  end

  // full-precision sum of products (scale 2^-(DF+CF)); operands are
  // sign-extended to the accumulator width first, so every product is exact
  function automatic logic signed [AW-1:0] mul(logic signed [CW-1:0] c,
                                               logic signed [DW-1:0] d);
    logic signed [AW-1:0] ce, de;
    ce = AW'(c);
    de = AW'(d);
    return ce * de;
  endfunction

  always_comb begin
    acc = mul(NA1, x0) + mul(NA2, x1) + mul(NA3, x2) - mul(NB1, y1) - mul(NB2, y2);
    // round to DF fractional bits: add half an LSB, then floor
    acc_rnd = acc + (AW'(1) <<< (CF - 1));
    q       = acc_rnd >>> CF;
    if (q > AW'(DMAX))      y_new = DMAX;
    else if (q < AW'(DMIN)) y_new = DMIN;
    else                    y_new = DW'(q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; out_valid <= 1'b0;
    end else if (clear) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x2 <= x1; x1 <= x0;
        y2 <= y1; y1 <= y_new;
      end
    end
  end

  assign y_fix = y1;
  assign y_int = IW'(y1 >>> DF);
endmodule
