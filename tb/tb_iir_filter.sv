// Self-checking testbench of iir_filter. Two instances are run: the default
// one (running sum 7, Ts = 2.56 ms, F = 0.153 Hz) and one with a longer
// sample period (Ts = 81.92 ms) whose coefficients are less coarsely
// quantised. For each, the testbench computes the Butterworth coefficients
// itself, quantises them to 18 fractional bits, runs the recurrence
//   y(n) = (x(n) + 2x(n-1) + x(n-2))/C - (b1/C) y(n-1) - (b2/C) y(n-2)
// in 64-bit integer arithmetic with round-half-up to 14 fractional bits,
// and requires the filter's output to match it bit for bit. The default
// coefficients are also compared with values worked out offline
// (1/C -> 2, 2/C -> 3, b1/C -> -522463, b2/C -> 260326 in units of 2^-18),
// the DC gain is checked (a step settles to its input value), and the
// output must appear one clock after the input strobe.
module tb_iir_filter;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [39:0] x_in = '0;
  logic signed [21:0] y_int_a, y_int_b;
  logic signed [35:0] y_fix_a, y_fix_b;
  logic out_valid_a, out_valid_b;
  int checks = 0, failures = 0;

  iir_filter dut_a (.clk, .rst_n, .clear, .in_valid, .x_in,
                    .y_int(y_int_a), .y_fix(y_fix_a), .out_valid(out_valid_a));
  iir_filter #(.TS(0.08192)) dut_b (.clk, .rst_n, .clear, .in_valid, .x_in,
                    .y_int(y_int_b), .y_fix(y_fix_b), .out_valid(out_valid_b));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  typedef struct { longint a1, a2, a3, b1, b2; longint x1, x2, y1, y2; } model_t;
  model_t ma, mb;

  function automatic longint qcoef(real v);
    real s = v * 262144.0;
    return (s >= 0.0) ? longint'($floor(s + 0.5)) : -longint'($floor(-s + 0.5));
  endfunction

  function automatic void init_model(ref model_t m, input real ts);
    real k, c, b1, b2;
    k  = ts * 2.0 * PI * 2.0 * 0.153;
    c  = 1.0 + 2.0 * $sqrt(2.0) / k + 4.0 / (k * k);
    b1 = 2.0 - 8.0 / (k * k);
    b2 = 1.0 - 2.0 * $sqrt(2.0) / k + 4.0 / (k * k);
    m.a1 = qcoef(1.0 / c); m.a2 = qcoef(2.0 / c); m.a3 = qcoef(1.0 / c);
    m.b1 = qcoef(b1 / c);  m.b2 = qcoef(b2 / c);
    m.x1 = 0; m.x2 = 0; m.y1 = 0; m.y2 = 0;
  endfunction

  function automatic longint step(ref model_t m, input longint x);
    longint x0, acc, y;
    x0  = (x >= (longint'(1) <<< 21)) ? (longint'(1) <<< 35) - 1 : x <<< 14;  // input saturates
    acc = m.a1 * x0 + m.a2 * m.x1 + m.a3 * m.x2 - m.b1 * m.y1 - m.b2 * m.y2;
    y   = (acc + (longint'(1) <<< 17)) >>> 18;
    if (y > (longint'(1) <<< 35) - 1) y = (longint'(1) <<< 35) - 1;
    if (y < -(longint'(1) <<< 35))    y = -(longint'(1) <<< 35);
    m.x2 = m.x1; m.x1 = x0; m.y2 = m.y1; m.y1 = y;
    return y;
  endfunction

  task automatic sample(input longint x);
    longint ea, eb;
    @(negedge clk);
    x_in = 40'(x); in_valid = 1;
    ea = step(ma, x); eb = step(mb, x);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid_a || !out_valid_b) begin failures++; $display("out_valid missing"); end
    checks++;
    if (y_fix_a != 36'(ea) || y_fix_b != 36'(eb)) begin
      failures++;
      if (failures < 10) $display("x=%0d: got %0d/%0d expected %0d/%0d", x, y_fix_a, y_fix_b, ea, eb);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid_a) begin failures++; $display("out_valid longer than one clock"); end
  endtask

  initial begin
    init_model(ma, 0.00256);
    init_model(mb, 0.08192);
    checks++;
    if (ma.a1 != 2 || ma.a2 != 3 || ma.b1 != -522463 || ma.b2 != 260326) begin
      failures++; $display("default coefficients differ from the offline values");
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // step response: settles at the input value (unity DC gain)
    for (int i = 0; i < 6000; i++) sample(10000);
    checks++;
    if (y_int_a < 9990 || y_int_a > 10010 || y_int_b < 9990 || y_int_b > 10010) begin
      failures++; $display("step did not settle: %0d %0d", y_int_a, y_int_b);
    end
    // noisy sine around an offset
    for (int i = 0; i < 6000; i++) begin
      real s = 20000.0 + 8000.0 * $sin(2.0 * PI * 0.153 * 0.00256 * i);
      sample(longint'(s) + $urandom_range(0, 200));
    end
    // saturation of a large input
    for (int i = 0; i < 50; i++) sample(longint'(1) << 30);
    // clear flushes the delay line
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    init_model(ma, 0.00256); init_model(mb, 0.08192);
    for (int i = 0; i < 200; i++) sample(longint'($urandom_range(0, 1000000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
