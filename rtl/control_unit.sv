// control_unit: Moore state machine that sequences the self test: for each
// channel in turn, first the gain and then the phase, cycling over all
// channels.
//
// Normal sequence for one channel (7 states):
//   WAIT_REF    wait for the reference p2p_valid (start of a reference
//               period; the reference counter holds the last period)
//   WAIT_CH     wait for the selected channel's p2p_valid; the channel
//               counter then holds the reference-to-channel delay
//   LOAD_GAIN   start the divider on channel p2p / reference p2p
//   DIV_GAIN    wait for the divider
//   STORE_GAIN  store the gain; start the divider on channel delay /
//               reference period (the phase, as a fraction of a period)
//   DIV_PHASE   wait for the divider
//   STORE_PHASE store the phase and step the channel address
// Error states, each writing an error code and moving on:
//   ERR_CH_OVF  channel counter overflow while waiting for the channel:
//               code on the channel's gain and phase buses, next channel
//   ERR_REF_OVF reference counter overflow while waiting for the
//               reference: code on both buses, next channel
// The channel counter restarts on the reference flag as well, so it can
// only overflow when neither signal produces events; while waiting for the
// channel, its overflow therefore takes priority over the reference
// counter's (which overflows at the same time). A channel that stays flat
// while the reference runs keeps the sequence waiting on that channel.
//   ERR_DIV0    division by zero: code on the bus of the measurement in
//               progress; after the gain the phase is still measured
// Transitions are driven by the channel and reference p2p_valid flags, the
// divider's control signals and the counter overflow flags, as documented;
// the state diagram itself is this design's reconstruction. The first
// reference p2p_valid after test_enable rises is only used to start the
// period count (flag ref_seen), so that the period held for the phase is a
// complete one. A channel p2p_valid that arrives together with the reference
// p2p_valid is not taken as the channel edge; the next one is.
//
// Timing: with a 16-bit divider and 6 decimals, the gain operands are
// loaded on the edge that ends LOAD_GAIN (edge 0); the gain is stored, and
// the phase operands loaded, on edge 23 (24 clocks counting the load); the
// phase is stored on edge 46: 2 + 2*(16+6) = 46 clocks after the load both
// results are in the output registers.
module control_unit #(
  parameter int unsigned N = selftest_pkg::NUM_CHANNELS,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_enable,
  input  logic          ref_p2p_valid,
  input  logic          ch_p2p_valid,      // selected channel
  input  logic          ref_cnt_overflow,
  input  logic          ch_cnt_overflow,
  input  logic          div_finishing,
  input  logic          div_by_zero,
  output logic [AW-1:0] ch_addr,
  output logic          div_start,
  output logic          div_sel_phase,     // 0: gain operands, 1: phase operands
  output logic          wr_gain,
  output logic          wr_phase,
  output logic          wr_error,
  output selftest_pkg::err_kind_e err_kind,
  output logic [3:0]    state_code         // for observation (signal tap)
);
  import selftest_pkg::*;

  typedef enum logic [3:0] {
    WAIT_REF    = 4'd0,
    WAIT_CH     = 4'd1,
    LOAD_GAIN   = 4'd2,
    DIV_GAIN    = 4'd3,
    STORE_GAIN  = 4'd4,
    DIV_PHASE   = 4'd5,
    STORE_PHASE = 4'd6,
    ERR_CH_OVF  = 4'd7,
    ERR_REF_OVF = 4'd8,
    ERR_DIV0    = 4'd9
  } state_e;

  state_e state_q, state_d;
  logic   in_phase_q;     // ERR_DIV0 came from the phase division
  logic   ref_seen_q;

  // next state
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      WAIT_REF:
        if (ref_cnt_overflow)                     state_d = ERR_REF_OVF;
        else if (ref_p2p_valid && ref_seen_q)     state_d = WAIT_CH;
      WAIT_CH:
        if (ch_cnt_overflow)                      state_d = ERR_CH_OVF;
        else if (ref_cnt_overflow)                state_d = ERR_REF_OVF;
        else if (ch_p2p_valid && !ref_p2p_valid)  state_d = LOAD_GAIN;
      LOAD_GAIN:                                  state_d = DIV_GAIN;
      DIV_GAIN:
        if (div_finishing)                        state_d = div_by_zero ? ERR_DIV0 : STORE_GAIN;
      STORE_GAIN:                                 state_d = DIV_PHASE;
      DIV_PHASE:
        if (div_finishing)                        state_d = div_by_zero ? ERR_DIV0 : STORE_PHASE;
      STORE_PHASE:                                state_d = WAIT_REF;
      ERR_CH_OVF:                                 state_d = WAIT_REF;
      ERR_REF_OVF:                                state_d = WAIT_REF;
      ERR_DIV0:                                   state_d = in_phase_q ? WAIT_REF : DIV_PHASE;
      default:                                    state_d = WAIT_REF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= WAIT_REF;
      in_phase_q <= 1'b0;
      ref_seen_q <= 1'b0;
      ch_addr    <= '0;
    end else if (!test_enable) begin
      state_q    <= WAIT_REF;
      in_phase_q <= 1'b0;
      ref_seen_q <= 1'b0;
      ch_addr    <= '0;
    end else begin
      state_q <= state_d;
      if (ref_p2p_valid) ref_seen_q <= 1'b1;
      if (state_q == DIV_GAIN)  in_phase_q <= 1'b0;
      if (state_q == DIV_PHASE) in_phase_q <= 1'b1;
      if (state_d == WAIT_REF && state_q != WAIT_REF &&
          !(state_q == ERR_DIV0 && !in_phase_q))
        ch_addr <= (ch_addr == AW'(N - 1)) ? '0 : ch_addr + 1'b1;
    end
  end

  // Moore outputs
  always_comb begin
    div_start     = 1'b0;
    div_sel_phase = 1'b0;
    wr_gain       = 1'b0;
    wr_phase      = 1'b0;
    wr_error      = 1'b0;
    err_kind      = ERR_DIVIDE_BY_ZERO;
    unique case (state_q)
      LOAD_GAIN:   div_start = 1'b1;
      STORE_GAIN:  begin wr_gain = 1'b1; div_start = 1'b1; div_sel_phase = 1'b1; end
      DIV_PHASE:   div_sel_phase = 1'b1;
      STORE_PHASE: wr_phase = 1'b1;
      ERR_CH_OVF:  begin wr_gain = 1'b1; wr_phase = 1'b1; wr_error = 1'b1;
                         err_kind = ERR_CHANNEL_OVERFLOW; end
      ERR_REF_OVF: begin wr_gain = 1'b1; wr_phase = 1'b1; wr_error = 1'b1;
                         err_kind = ERR_REFERENCE_OVERFLOW; end
      ERR_DIV0:    begin
                     wr_error = 1'b1;
                     err_kind = ERR_DIVIDE_BY_ZERO;
                     if (in_phase_q) wr_phase = 1'b1;
                     else begin
                       wr_gain = 1'b1; div_start = 1'b1; div_sel_phase = 1'b1;
                     end
                   end
      default: ;
    endcase
  end

  assign state_code = state_q;

  // the divider is never restarted while a division is in progress
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state_q == DIV_GAIN || state_q == DIV_PHASE) |-> !div_start)
    else $error("divider restarted while busy");
endmodule
