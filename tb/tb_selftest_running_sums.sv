// Testbench of selftest_top with other choices of running sum, the one
// configuration constant that decides whether the 16-bit period counter can
// hold a whole period of the 0.153 Hz stimulus (period in samples =
// 1 / (F * Ts)).
//   - Running sum 9 (Ts = 81.92 ms): 80 samples per period. The gains and
//     phases of four channels with known amplitude and lag are compared
//     with the response of the rounded Butterworth filter at this Ts,
//     within 3 LSB (one sample is 4.5 degrees here).
//   - Running sum 3 (Ts = 40 us): 163 399 samples per period, more than the
//     counter holds: every channel must report reference counter overflow
//     (110..0) on both buses.
module tb_selftest_running_sums;
  localparam real PI = 3.14159265358979323846;
  localparam real F = 0.153;
  localparam int  NCH = 4, QW = 22;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, test_enable = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- running sum 9 ----------------
  localparam real TS9 = 0.08192;
  logic [3:0][11:0][39:0] rs9;
  logic [5:0]  en9 = '0;
  logic [15:0] ref9 = '0;
  logic        refv9 = 0;
  logic [3:0][QW-1:0] gain9, phase9;
  logic [1:0] addr9;
  logic [3:0] st9;

  selftest_top #(.RS_NUMBER(9)) dut9 (
    .test_clock(clk), .rst_n, .test_enable, .rs_data(rs9), .rs_enable(en9),
    .ref_data(ref9), .ref_valid(refv9), .gain(gain9), .phase(phase9),
    .ch_addr(addr9), .state_code(st9));

  // ---------------- running sum 3 ----------------
  localparam real TS3 = 0.00004;
  logic [3:0][11:0][39:0] rs3;
  logic [5:0]  en3 = '0;
  logic [15:0] ref3 = '0;
  logic        refv3 = 0;
  logic [3:0][QW-1:0] gain3, phase3;
  logic [1:0] addr3;
  logic [3:0] st3;

  selftest_top #(.RS_NUMBER(3)) dut3 (
    .test_clock(clk), .rst_n, .test_enable, .rs_data(rs3), .rs_enable(en3),
    .ref_data(ref3), .ref_valid(refv3), .gain(gain3), .phase(phase3),
    .ch_addr(addr3), .state_code(st3));

  real amp [NCH] = '{8000.0, 12000.0, 16000.0, 24000.0};
  real lag [NCH] = '{10.0, 45.0, 90.0, 200.0};
  real ref_amp = 10000.0;

  // one sample of both configurations every 2 clocks
  longint n = 0;
  bit     phase_clk = 0;
  always @(negedge clk) begin
    phase_clk <= !phase_clk;
    if (rst_n && phase_clk) begin
      real p9, p3;
      p9 = 2.0 * PI * F * TS9 * real'(n);
      p3 = 2.0 * PI * F * TS3 * real'(n);
      ref9 <= 16'(longint'(32768.0 + ref_amp * $sin(p9)));
      ref3 <= 16'(longint'(32768.0 + ref_amp * $sin(p3)));
      for (int c = 0; c < NCH; c++) begin
        rs9[c][9] <= 40'(longint'(500000.0 + amp[c] * $sin(p9 - lag[c] * PI / 180.0)));
        rs3[c][3] <= 40'(longint'(500000.0 + amp[c] * $sin(p3 - lag[c] * PI / 180.0)));
      end
      refv9 <= 1; refv3 <= 1;
      en9 <= 6'b010000;   // enable of sums 8-9
      en3 <= 6'b000010;   // enable of sums 2-3
      n <= n + 1;
    end else begin
      refv9 <= 0; refv3 <= 0; en9 <= '0; en3 <= '0;
    end
  end

  // response of the rounded filter at F for sample period ts
  function automatic real q18(real v);
    return (v >= 0.0) ? $floor(v * 262144.0 + 0.5) : -$floor(-v * 262144.0 + 0.5);
  endfunction
  function automatic void response(input real ts, output real mag, output real deg);
    real k, c, b1, b2, a1, a2, a3, nb1, nb2, w, nr, ni, dr, di;
    k  = ts * 2.0 * PI * 2.0 * F;
    c  = 1.0 + 2.0 * $sqrt(2.0) / k + 4.0 / (k * k);
    b1 = 2.0 - 8.0 / (k * k);
    b2 = 1.0 - 2.0 * $sqrt(2.0) / k + 4.0 / (k * k);
    a1 = q18(1.0 / c); a2 = q18(2.0 / c); a3 = q18(1.0 / c);
    nb1 = q18(b1 / c); nb2 = q18(b2 / c);
    w  = 2.0 * PI * F * ts;
    nr = a1 + a2 * $cos(w) + a3 * $cos(2.0 * w);
    ni = -a2 * $sin(w) - a3 * $sin(2.0 * w);
    dr = 262144.0 + nb1 * $cos(w) + nb2 * $cos(2.0 * w);
    di = -nb1 * $sin(w) - nb2 * $sin(2.0 * w);
    mag = $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
    deg = -($atan2(ni, nr) - $atan2(di, dr)) * 180.0 / PI;
  endfunction

  int stores9 = 0, ovf3 = 0;
  always @(posedge clk) begin
    if (st9 == 4'd6) stores9++;
    if (st3 == 4'd8) ovf3++;
  end

  initial begin
    real mag, deg;
    for (int c = 0; c < NCH; c++) begin rs9[c] = '0; rs3[c] = '0; end
    response(TS9, mag, deg);
    $display("running sum 9: filter gain %0.4f, lag %0.2f deg at F", mag, deg);
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(negedge clk); test_enable = 1;
    // running sum 9: let the filters settle, then one full round
    while (stores9 < 8) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int c = 0; c < NCH; c++) begin
      int g, p, eg, ep;
      eg = int'(amp[c] * mag / ref_amp * 64.0);
      ep = int'((lag[c] + deg) / 360.0 * 64.0);
      g = int'(gain9[c]); p = int'(phase9[c]);
      $display("RS9 ch %0d: gain %0d/64 (exp %0d)  phase %0d/64 (exp %0d)", c, g, eg, p, ep);
      checks++;
      if (g < eg - 3 || g > eg + 3) begin failures++; $display("RS9 ch %0d gain wrong", c); end
      checks++;
      if (p < ep - 3 || p > ep + 3) begin failures++; $display("RS9 ch %0d phase wrong", c); end
    end
    // running sum 3: the period does not fit the counter
    while (ovf3 < 4) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (gain3[c] != 22'h300000 || phase3[c] != 22'h300000) begin
        failures++; $display("RS3 ch %0d: %h %h, expected reference overflow", c, gain3[c], phase3[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
