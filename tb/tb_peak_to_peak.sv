// Self-checking testbench of peak_to_peak (W = 17). A reference model in
// the testbench follows the same successive-comparison rule (a turn from
// rising to falling marks a maximum, a turn from falling to rising a
// minimum, which yields max - min) on sines of several amplitudes, on
// square-ish and random sequences and on a signal with flat tops. Every
// p2p_valid pulse, its value and its timing (one clock after the sample that
// turns the signal upwards) must match the model, and the pulse count must
// be one per period for a clean sine.
module tb_peak_to_peak;
  localparam int W = 17;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [W-1:0] din = '0;
  logic [W-1:0] p2p;
  logic p2p_valid;
  int checks = 0, failures = 0, pulses = 0;

  peak_to_peak #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int  m_prev, m_max;
  bit  m_have_prev, m_have_max, m_fall;

  task automatic model_reset();
    m_have_prev = 0; m_have_max = 0; m_fall = 0;
  endtask

  task automatic sample(input int v);
    bit exp_v; int exp_p;
    exp_v = 0; exp_p = 0;
    if (m_have_prev) begin
      if (!m_fall && v < m_prev) begin m_max = m_prev; m_have_max = 1; m_fall = 1; end
      else if (m_fall && v > m_prev) begin
        m_fall = 0;
        if (m_have_max) begin exp_v = 1; exp_p = m_max - m_prev; end
      end
    end
    m_prev = v; m_have_prev = 1;
    @(negedge clk); din = W'(v); in_valid = 1;
    @(posedge clk); #1; in_valid = 0;
    checks++;
    if (p2p_valid != exp_v || (exp_v && p2p != W'(exp_p))) begin
      failures++;
      if (failures < 10) $display("v=%0d: valid %0b p2p %0d, expected %0b %0d", v, p2p_valid, p2p, exp_v, exp_p);
    end
    if (p2p_valid) pulses++;
    // idle clock between samples: valid is a single pulse
    @(posedge clk); #1;
    checks++;
    if (p2p_valid) begin failures++; $display("p2p_valid held"); end
  endtask

  initial begin
    model_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // clean sine, 10 periods of 200 samples, amplitude 30000 p2p
    for (int i = 0; i < 2000; i++)
      sample(int'($floor(15000.0 * $sin(2.0 * PI * i / 200.0) + 0.5)));
    checks++;
    if (pulses != 10 && pulses != 9) begin failures++; $display("%0d pulses for 10 periods", pulses); end
    // sine with flat tops (clipped)
    for (int i = 0; i < 1000; i++) begin
      int v;
      v = int'($floor(20000.0 * $sin(2.0 * PI * i / 100.0)));
      if (v > 12000) v = 12000;
      if (v < -9000) v = -9000;
      sample(v);
    end
    // random walk
    begin
      int v = 0;
      for (int i = 0; i < 3000; i++) begin
        v = v + $urandom_range(0, 2000) - 1000;
        if (v > 60000) v = 60000;
        if (v < -60000) v = -60000;
        sample(v);
      end
    end
    // clear restarts the search for a maximum
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    model_reset();
    for (int i = 0; i < 500; i++) sample(int'($urandom_range(0, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
