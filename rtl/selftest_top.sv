// selftest_top: self test of the beam loss monitoring acquisition chain.
//
// With no beam in the machine, a sine-wave reference stimulates the
// acquisition chain of each channel, and a harmonic analysis of the chain's
// response gives, per channel, its closed-loop gain and phase. The gain is
// the ratio of the channel's peak-to-peak value to the reference's, and the
// phase is the delay from the reference's peak-to-peak event to the
// channel's, as a fraction of the reference period. One divider computes
// both, for each channel in turn.
//
// Datapath: rs_decoder picks the running sum under test of every channel;
// one iir_filter (2nd-order Butterworth) per channel removes the noise
// before a peak_to_peak extractor; the reference samples go straight to
// their own peak_to_peak extractor. channel_select multiplexes the channel
// values and flags by the control unit's address. hold_counter ref_counter
// counts the reference period and channel_counter the reference-to-channel
// delay (its reset_hold is the OR of the reference and selected channel
// p2p_valid flags); both count reference samples. fixed_point_divider
// divides either the peak-to-peak pair (gain) or the counter pair (phase),
// chosen by the control_unit, and result_store keeps the results and the
// error codes.
//
// Interface: one clock (test_clock) for the whole block; ref_valid marks a
// reference sample and the selected running-sum enable a channel sample.
// Results are unsigned fixed point with DEC fractional bits: gain[c] =
// channel/reference peak-to-peak, phase[c] = delay/period (multiply by 360
// for degrees). The valid/not-valid decision on these values (magnitude
// comparators and the beam permit flag) is not part of this block. Running
// the divider and the counters on the test clock, with sample strobes
// rather than separate clock trees, is this design's choice.
module selftest_top #(
  parameter int unsigned NUM_CH    = selftest_pkg::NUM_CHANNELS,
  parameter int unsigned NUM_RS    = selftest_pkg::NUM_RUNNING_SUMS,
  parameter int unsigned NUM_EN    = selftest_pkg::NUM_RS_ENABLES,
  parameter int unsigned RS_NUMBER = selftest_pkg::RUNNING_SUM_NUMBER,
  parameter int unsigned CH_DW     = selftest_pkg::CHANNEL_DATA_WIDTH,
  parameter int unsigned REF_DW    = selftest_pkg::REFERENCE_DATA_WIDTH,
  parameter int unsigned INT_DW    = selftest_pkg::INTERNAL_DATA_WIDTH,
  parameter int unsigned DEC       = selftest_pkg::OUTPUT_DECIMALS,
  parameter real         F_IN      = selftest_pkg::INPUT_FREQUENCY,
  localparam int unsigned QW       = INT_DW + DEC,
  localparam int unsigned AW       = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic                                        test_clock,
  input  logic                                        rst_n,
  input  logic                                        test_enable,
  input  logic [NUM_CH-1:0][NUM_RS-1:0][CH_DW-1:0]    rs_data,
  input  logic [NUM_EN-1:0]                           rs_enable,
  input  logic [REF_DW-1:0]                           ref_data,
  input  logic                                        ref_valid,
  output logic [NUM_CH-1:0][QW-1:0]                   gain,
  output logic [NUM_CH-1:0][QW-1:0]                   phase,
  output logic [AW-1:0]                               ch_addr,
  output logic [3:0]                                  state_code
);
  import selftest_pkg::*;

  localparam int  FW = FILTER_INTERNAL_MSB + 1;   // filter integer bits
  localparam int  RW = REF_DW + 1;                // reference as signed
  localparam real TS = RS_UPDATES[RS_NUMBER];

  logic clear;
  assign clear = !test_enable;

  // ---------------- channel path ----------------
  logic [NUM_CH-1:0][CH_DW-1:0] ch_data;
  logic                         ch_valid;

  rs_decoder #(.NUM_CH(NUM_CH), .NUM_RS(NUM_RS), .NUM_EN(NUM_EN),
               .CH_DW(CH_DW), .RS_NUMBER(RS_NUMBER)) u_decoder (
    .clk(test_clock), .rst_n, .test_enable, .rs_data, .rs_enable,
    .ch_data, .ch_valid);

  logic [NUM_CH-1:0]         filt_valid;
  logic [NUM_CH-1:0][FW-1:0] ch_p2p;
  logic [NUM_CH-1:0]         ch_p2p_valid;

  for (genvar c = 0; c < int'(NUM_CH); c++) begin : g_ch
    logic signed [FW-1:0] y_int;
    iir_filter #(.IN_W(CH_DW), .F_IN(F_IN), .TS(TS)) u_filter (
      .clk(test_clock), .rst_n, .clear, .in_valid(ch_valid), .x_in(ch_data[c]),
      .y_int, .y_fix(), .out_valid(filt_valid[c]));

    peak_to_peak #(.W(FW)) u_p2p (
      .clk(test_clock), .rst_n, .clear, .in_valid(filt_valid[c]), .din(y_int),
      .p2p(ch_p2p[c]), .p2p_valid(ch_p2p_valid[c]));
  end

  // ---------------- reference path ----------------
  logic [RW-1:0] ref_p2p;
  logic          ref_p2p_valid;

  peak_to_peak #(.W(RW)) u_ref_p2p (
    .clk(test_clock), .rst_n, .clear, .in_valid(ref_valid && test_enable),
    .din({1'b0, ref_data}), .p2p(ref_p2p), .p2p_valid(ref_p2p_valid));

  // ---------------- channel multiplexers ----------------
  logic [INT_DW-1:0] ch_p2p_sel;
  logic              ch_p2p_valid_sel;

  channel_select #(.N(NUM_CH), .W(FW), .OW(INT_DW)) u_select (
    .addr(ch_addr), .p2p(ch_p2p), .p2p_valid(ch_p2p_valid),
    .p2p_sel(ch_p2p_sel), .p2p_valid_sel(ch_p2p_valid_sel));

  // ---------------- phase counters ----------------
  logic              tick;
  logic [INT_DW-1:0] ref_period, ch_delay;
  logic              ref_ovf, ch_ovf;

  assign tick = ref_valid && test_enable;

  hold_counter #(.W(INT_DW)) u_ref_counter (
    .clk(test_clock), .rst_n, .clear, .tick, .reset_hold(ref_p2p_valid),
    .count(), .held_value(ref_period), .overflow(ref_ovf));

  hold_counter #(.W(INT_DW)) u_channel_counter (
    .clk(test_clock), .rst_n, .clear, .tick,
    .reset_hold(ref_p2p_valid || ch_p2p_valid_sel),
    .count(), .held_value(ch_delay), .overflow(ch_ovf));

  // ---------------- control and division ----------------
  logic              div_start, div_sel_phase, div_busy, div_finishing, div_done, div_zero;
  logic              wr_gain, wr_phase, wr_error;
  err_kind_e         err_kind;
  logic [INT_DW-1:0] dividend, divisor;
  logic [QW-1:0]     quotient;

  control_unit #(.N(NUM_CH)) u_control (
    .clk(test_clock), .rst_n, .test_enable,
    .ref_p2p_valid, .ch_p2p_valid(ch_p2p_valid_sel),
    .ref_cnt_overflow(ref_ovf), .ch_cnt_overflow(ch_ovf),
    .div_finishing, .div_by_zero(div_zero),
    .ch_addr, .div_start, .div_sel_phase, .wr_gain, .wr_phase, .wr_error,
    .err_kind, .state_code);

  // reference p2p of a 16-bit ADC always fits in INT_DW bits when
  // REF_DW <= INT_DW; larger values saturate
  logic [INT_DW-1:0] ref_p2p_op;
  always_comb begin
    if (RW > INT_DW && (ref_p2p >> INT_DW) != '0) ref_p2p_op = '1;
    else                                          ref_p2p_op = INT_DW'(ref_p2p);
    dividend = div_sel_phase ? ch_delay   : ch_p2p_sel;
    divisor  = div_sel_phase ? ref_period : ref_p2p_op;
  end

  fixed_point_divider #(.DW(INT_DW), .DEC(DEC)) u_divider (
    .clk(test_clock), .rst_n, .start(div_start), .dividend, .divisor,
    .busy(div_busy), .finishing(div_finishing), .done(div_done),
    .quotient, .div_by_zero(div_zero));

  result_store #(.N(NUM_CH), .QW(QW)) u_results (
    .clk(test_clock), .rst_n, .addr(ch_addr), .wr_gain, .wr_phase, .wr_error,
    .err_kind, .quotient, .gain, .phase);

  // a quotient is stored only in the clock after the division has ended
  a_store_after_done: assert property (@(posedge test_clock) disable iff (!rst_n)
                                       (wr_gain || wr_phase) && !wr_error |-> div_done)
    else $error("result stored before the division ended");
endmodule
