// End-to-end testbench of selftest_top at its default parameters (4
// channels, running sum 7, 40-bit sums, 16-bit reference and operands,
// 6 fractional bits, F = 0.153 Hz). A reference sine of 20000 counts peak
// to peak and four channel responses with known gain and lag (plus a
// little noise on the channels) are sampled every 4 clocks; running sum 7
// and its enable carry the channels, the other sums carry unrelated values.
//
// Scenarios and checks:
//   1. Normal operation: every channel's gain and phase are compared with
//      the values expected from the stimulus: gain = channel/reference
//      amplitude times the filter's magnitude at F, phase = (lag + filter
//      phase lag at F) / 360, both to within 2 LSB of the 6-bit fraction.
//      The filter response is that of the Butterworth coefficients after
//      rounding to 18 fractional bits (worked out here from F and Ts); at
//      the default sample period this rounding is coarse (gain 0.996, lag
//      39.6 degrees instead of 0.970 and 43.3 for the ideal filter). The clocks from the gain load to the phase store
//      must be 46 each time.
//   2. The reference stops (ref_valid keeps coming): the reference counter
//      overflows and every channel's buses get 110..0.
//   3. The reference goes flat and the running sums stop being refreshed
//      while a channel is awaited: that channel's buses get 100..0.
//   4. test_enable is dropped and raised: measurements resume and are
//      correct again.
// Each mechanism (gain store, phase store, address wrap, the two overflow
// codes, restart after enable) is counted and must have happened.
module tb_selftest_top;
  import selftest_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  NCH = 4, QW = 22, SPACING = 4;
  localparam real TS = 0.00256, F = 0.153;

  logic test_clock = 0, rst_n = 0, test_enable = 0;
  logic [3:0][11:0][39:0] rs_data;
  logic [5:0] rs_enable = '0;
  logic [15:0] ref_data = '0;
  logic ref_valid = 0;
  logic [3:0][QW-1:0] gain, phase;
  logic [1:0] ch_addr;
  logic [3:0] state_code;
  int checks = 0, failures = 0;

  selftest_top dut (.*);

  always #5 test_clock = ~test_clock;

  initial begin
    repeat (3000000) @(posedge test_clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: per channel amplitude (counts, peak) and lag (degrees)
  real amp [NCH] = '{8000.0, 12000.0, 16000.0, 24000.0};
  real lag [NCH] = '{10.0, 45.0, 90.0, 200.0};
  real ref_amp = 10000.0;
  bit  ref_alive = 1, ch_alive = 1;
  longint n = 0;   // sample index

  // stimulus generator: one sample every SPACING clocks
  int div_cnt = 0;
  always @(negedge test_clock) begin
    div_cnt <= (div_cnt == SPACING - 1) ? 0 : div_cnt + 1;
    if (rst_n && div_cnt == 0) begin
      real ph;
      ph = 2.0 * PI * F * TS * real'(n);
      ref_data <= ref_alive ? 16'(longint'(32768.0 + ref_amp * $sin(ph))) : 16'd32768;
      for (int c = 0; c < NCH; c++) begin
        for (int s = 0; s < 12; s++) rs_data[c][s] <= 40'($urandom);
        rs_data[c][7] <= ch_alive
          ? 40'(longint'(500000.0 + amp[c] * $sin(ph - lag[c] * PI / 180.0)) + $urandom_range(0, 40))
          : 40'd500000;
      end
      ref_valid <= 1;
      rs_enable <= ch_alive ? 6'b001000 : 6'b000000;  // a dead channel path delivers no samples
      n <= n + 1;
    end else begin
      ref_valid <= 0;
      rs_enable <= 6'($urandom) & 6'b110111;
    end
  end

  // mechanism counters
  int n_gain = 0, n_phase = 0, n_wrap = 0, n_ref_ovf = 0, n_ch_ovf = 0, n_restart = 0;
  int load_edge = -1, edge_no = 0;
  logic [1:0] prev_addr = '0;
  always @(posedge test_clock) begin
    edge_no <= edge_no + 1;
    if (rst_n) begin
      if (state_code == 4'd2) load_edge <= edge_no;
      if (state_code == 4'd4) n_gain++;
      if (state_code == 4'd6) begin
        n_phase++;
        checks++;
        if (edge_no - load_edge != 46) begin
          failures++; $display("gain load to phase store: %0d clocks", edge_no - load_edge);
        end
      end
      if (state_code == 4'd7) n_ch_ovf++;
      if (state_code == 4'd8) n_ref_ovf++;
      if (prev_addr == 2'd3 && ch_addr == 2'd0) n_wrap++;
      prev_addr <= ch_addr;
    end
  end

  // response of the filter as built: the Butterworth coefficients computed
  // here from F and Ts, rounded to 18 fractional bits, evaluated at the
  // input frequency: H = (a1 + a2 e^-jw + a3 e^-2jw) / (1 + b1 e^-jw + b2 e^-2jw)
  real h_mag, h_deg;
  function automatic real q18(real v);
    return (v >= 0.0) ? $floor(v * 262144.0 + 0.5) : -$floor(-v * 262144.0 + 0.5);
  endfunction
  function automatic void filter_response();
    real k, c, b1, b2, a1, a2, a3, nb1, nb2, w, nr, ni, dr, di;
    k  = TS * 2.0 * PI * 2.0 * F;
    c  = 1.0 + 2.0 * $sqrt(2.0) / k + 4.0 / (k * k);
    b1 = 2.0 - 8.0 / (k * k);
    b2 = 1.0 - 2.0 * $sqrt(2.0) / k + 4.0 / (k * k);
    a1 = q18(1.0 / c); a2 = q18(2.0 / c); a3 = q18(1.0 / c);
    nb1 = q18(b1 / c); nb2 = q18(b2 / c);
    w  = 2.0 * PI * F * TS;
    nr = a1 + a2 * $cos(w) + a3 * $cos(2.0 * w);
    ni = -a2 * $sin(w) - a3 * $sin(2.0 * w);
    dr = 262144.0 + nb1 * $cos(w) + nb2 * $cos(2.0 * w);
    di = -nb1 * $sin(w) - nb2 * $sin(2.0 * w);
    h_mag = $sqrt((nr * nr + ni * ni) / (dr * dr + di * di));
    h_deg = -($atan2(ni, nr) - $atan2(di, dr)) * 180.0 / PI;
  endfunction

  task automatic wait_phase_stores(input int k);
    int target;
    target = n_phase + k;
    while (n_phase < target) @(posedge test_clock);
    repeat (2) @(posedge test_clock);
  endtask

  task automatic check_results(input string tag);
    for (int c = 0; c < NCH; c++) begin
      real eg, ep; int g, p, egi, epi;
      eg  = amp[c] * h_mag / ref_amp;
      ep  = (lag[c] + h_deg) / 360.0;
      egi = int'(eg * 64.0);
      epi = int'(ep * 64.0);
      g = int'(gain[c]); p = int'(phase[c]);
      checks++;
      if (g < egi - 2 || g > egi + 2) begin
        failures++; $display("%s ch %0d gain %0d/64 expected %0d/64", tag, c, g, egi);
      end
      checks++;
      if (p < epi - 2 || p > epi + 2) begin
        failures++; $display("%s ch %0d phase %0d/64 expected %0d/64", tag, c, p, epi);
      end
      $display("%s ch %0d: gain %0.3f (exp %0.3f)  phase %0.1f deg (exp %0.1f)",
               tag, c, g / 64.0, eg, p / 64.0 * 360.0, ep * 360.0);
    end
  endtask

  initial begin
    rs_data = '0;
    filter_response();
    $display("filter response at F: gain %0.4f, lag %0.2f deg", h_mag, h_deg);
    repeat (5) @(posedge test_clock);
    rst_n = 1;
    @(negedge test_clock); test_enable = 1;
    // 1. normal: let filters settle, then two full rounds
    wait_phase_stores(8);
    check_results("normal");

    $display("edge %0d: reference stops", edge_no);
    // 2. reference stops
    ref_alive = 0;
    while (n_ref_ovf < 4) @(posedge test_clock);
    repeat (10) @(posedge test_clock);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (gain[c] != 22'h300000 || phase[c] != 22'h300000) begin
        failures++; $display("ref overflow code missing on ch %0d: %h %h", c, gain[c], phase[c]);
      end
    end

    $display("edge %0d: all signals stop while a channel is awaited", edge_no);
    // 3. everything stops while a channel is awaited: the reference goes
    //    flat and the running sums are no longer refreshed. Should a last
    //    reference extremum still let the sequence go on, the signals are
    //    restored and the attempt repeated.
    for (int attempt = 0; attempt < 8 && n_ch_ovf == 0; attempt++) begin
      int a;
      ref_alive = 1; ch_alive = 1;
      while (state_code != 4'd1) @(posedge test_clock);
      @(negedge test_clock);
      a = int'(ch_addr);
      ref_alive = 0; ch_alive = 0;
      while (n_ch_ovf == 0 && state_code == 4'd1) @(posedge test_clock);
      repeat (3) @(posedge test_clock);
      if (n_ch_ovf != 0) begin
        checks++;
        if (gain[a] != 22'h200000 || phase[a] != 22'h200000) begin
          failures++; $display("channel overflow code missing on ch %0d: %h %h", a, gain[a], phase[a]);
        end
      end else begin
        // let the reference run again until the sequence waits for a channel
        ref_alive = 1; ch_alive = 1;
        repeat (200) @(posedge test_clock);
      end
    end

    $display("edge %0d: restart", edge_no);
    // 4. restart through test_enable
    ref_alive = 1; ch_alive = 1;
    @(negedge test_clock); test_enable = 0;
    repeat (20) @(negedge test_clock);
    checks++;
    if (ch_addr != 0 || state_code != 0) begin failures++; $display("not restarted"); end
    test_enable = 1; n_restart++;
    wait_phase_stores(8);
    check_results("restart");

    // every mechanism must have happened
    checks++; if (n_gain == 0)    begin failures++; $display("no gain store"); end
    checks++; if (n_phase == 0)   begin failures++; $display("no phase store"); end
    checks++; if (n_wrap == 0)    begin failures++; $display("no channel wrap"); end
    checks++; if (n_ref_ovf == 0) begin failures++; $display("no reference overflow"); end
    checks++; if (n_ch_ovf == 0)  begin failures++; $display("no channel overflow"); end
    checks++; if (n_restart == 0) begin failures++; $display("no restart"); end
    $display("mechanisms: gain %0d phase %0d wrap %0d ref_ovf %0d ch_ovf %0d restart %0d",
             n_gain, n_phase, n_wrap, n_ref_ovf, n_ch_ovf, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
