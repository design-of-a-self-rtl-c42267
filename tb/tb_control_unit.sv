// Self-checking testbench of control_unit (4 channels). The divider is
// modelled here: after a start it reports finishing on its 22nd step
// (16-bit operands, 6 decimals), and div_by_zero can be forced per
// division. The testbench drives reference and channel p2p_valid pulses
// and counter overflows and logs, per clock edge, the divider starts and
// the result writes. It checks:
//   - the first reference pulse after enable only arms the sequence;
//   - gain load one clock after the channel pulse, gain store and phase
//     load 23 edges after the gain load (24 clocks counting both), phase
//     store 46 edges after the gain load (2 + 2*(16+6));
//   - operand select, channel address during the stores and its wrap-around;
//   - channel / reference counter overflow write their codes to both buses;
//   - a division by zero writes its code on the gain or the phase bus, and
//     after a gain error the phase is still measured;
//   - dropping test_enable returns to the start.
module tb_control_unit;
  import selftest_pkg::*;
  localparam int N = 4, QW = 22;
  logic clk = 0, rst_n = 0, test_enable = 0;
  logic ref_p2p_valid = 0, ch_p2p_valid = 0, ref_cnt_overflow = 0, ch_cnt_overflow = 0;
  logic div_finishing, div_by_zero;
  logic [1:0] ch_addr;
  logic div_start, div_sel_phase, wr_gain, wr_phase, wr_error;
  err_kind_e err_kind;
  logic [3:0] state_code;
  int checks = 0, failures = 0;

  control_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- divider model ----
  bit   m_busy = 0, m_zero = 0, force_zero_next = 0;
  int   m_step = 0;
  assign div_finishing = m_busy && (m_step == QW - 1);
  assign div_by_zero   = m_zero;
  always @(posedge clk) begin
    if (!m_busy && div_start) begin
      m_busy <= 1; m_step <= 0; m_zero <= force_zero_next;
    end else if (m_busy) begin
      m_step <= m_step + 1;
      if (m_step == QW - 1) m_busy <= 0;
    end
  end

  // ---- event log ----
  typedef struct { int edge_no; bit phase_sel; bit err; err_kind_e kind; int addr; } ev_t;
  ev_t starts[$], gains[$], phases[$];
  int edge_no = 0;
  always @(posedge clk) begin
    edge_no <= edge_no + 1;
    if (rst_n && test_enable) begin
      if (div_start) starts.push_back('{edge_no, div_sel_phase, 1'b0, err_kind, int'(ch_addr)});
      if (wr_gain)   gains.push_back('{edge_no, 1'b0, wr_error, err_kind, int'(ch_addr)});
      if (wr_phase)  phases.push_back('{edge_no, 1'b0, wr_error, err_kind, int'(ch_addr)});
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic clear_log();
    starts.delete(); gains.delete(); phases.delete();
  endtask

  // one normal (or division-error) measurement of channel a
  task automatic measure(input int a, input bit z_gain, input bit z_phase);
    int ch_edge, load;
    clear_log();
    pulse(ref_p2p_valid);
    repeat (5) @(negedge clk);
    force_zero_next = z_gain;
    @(negedge clk); ch_p2p_valid = 1; ch_edge = edge_no;
    @(negedge clk); ch_p2p_valid = 0;
    // gain divider running: set the zero flag of the phase division
    repeat (5) @(negedge clk);
    force_zero_next = z_phase;
    repeat (60) @(negedge clk);
    force_zero_next = 0;
    check(starts.size() == 2, $sformatf("ch %0d: %0d divider starts", a, starts.size()));
    check(gains.size() == 1 && phases.size() == 1, $sformatf("ch %0d: %0d/%0d writes", a, gains.size(), phases.size()));
    if (starts.size() == 2 && gains.size() == 1 && phases.size() == 1) begin
      load = starts[0].edge_no;
      check(load == ch_edge + 1, "gain load one clock after the channel pulse");
      check(!starts[0].phase_sel && starts[1].phase_sel, "operand select");
      check(gains[0].edge_no - load == 23, $sformatf("gain stored %0d edges after load", gains[0].edge_no - load));
      check(starts[1].edge_no == gains[0].edge_no, "phase load with gain store");
      check(phases[0].edge_no - load == 46, $sformatf("phase stored %0d edges after load", phases[0].edge_no - load));
      check(gains[0].addr == a && phases[0].addr == a, "channel address during stores");
      check(gains[0].err == z_gain && (!z_gain || gains[0].kind == ERR_DIVIDE_BY_ZERO), "gain error code");
      check(phases[0].err == z_phase && (!z_phase || phases[0].kind == ERR_DIVIDE_BY_ZERO), "phase error code");
    end
    check(int'(ch_addr) == (a + 1) % N, "address advanced");
    check(state_code == 4'd0, "back to waiting for the reference");
  endtask

  task automatic overflow_case(input int a, input bit use_ref);
    clear_log();
    if (!use_ref) begin
      pulse(ref_p2p_valid);
      repeat (3) @(negedge clk);
      pulse(ch_cnt_overflow);
    end else begin
      pulse(ref_cnt_overflow);
    end
    repeat (4) @(negedge clk);
    check(gains.size() == 1 && phases.size() == 1 && starts.size() == 0, "overflow writes both buses once");
    if (gains.size() == 1 && phases.size() == 1) begin
      check(gains[0].err && phases[0].err && gains[0].addr == a, "overflow error write");
      check(gains[0].kind == (use_ref ? ERR_REFERENCE_OVERFLOW : ERR_CHANNEL_OVERFLOW), "overflow code kind");
    end
    check(int'(ch_addr) == (a + 1) % N, "address advanced after overflow");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); test_enable = 1;
    // arming pulse, then a channel pulse: nothing may start
    clear_log();
    pulse(ref_p2p_valid);
    repeat (3) @(negedge clk);
    pulse(ch_p2p_valid);
    repeat (5) @(negedge clk);
    check(starts.size() == 0, "first reference pulse only arms");
    for (int a = 0; a < N; a++) measure(a, 0, 0);       // one full cycle
    check(ch_addr == 0, "address wrapped");
    measure(0, 1, 0);                                 // gain division by zero
    measure(1, 0, 1);                                 // phase division by zero
    overflow_case(2, 0);                              // channel counter overflow
    overflow_case(3, 1);                              // reference counter overflow
    measure(0, 0, 0);
    // simultaneous reference and channel pulses: the channel one is not taken
    clear_log();
    pulse(ref_p2p_valid);
    @(negedge clk); ref_p2p_valid = 1; ch_p2p_valid = 1;
    @(negedge clk); ref_p2p_valid = 0; ch_p2p_valid = 0;
    repeat (5) @(negedge clk);
    check(starts.size() == 0 && state_code == 4'd1, "coincident pulses ignored");
    // disable returns to the start
    @(negedge clk); test_enable = 0;
    @(negedge clk); test_enable = 1;
    check(ch_addr == 0 && state_code == 4'd0, "test_enable low restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
