// rs_decoder: picks the running sum under test out of the measurement
// outputs of every channel.
//
// The acquisition electronics deliver, per channel, 12 running sums of
// CH_DW bits; consecutive pairs of sums share one enable (6 enables), which
// pulses when that pair is refreshed. Only the sum selected by RS_NUMBER and
// its enable (RS_NUMBER/2) are passed on, one bus per channel, with a
// one-cycle valid strobe. The selection is fixed at elaboration, as in the
// documented design; registering the output (one cycle of latency) and the
// gating by test_enable are this design's choices.
//
// Timing: ch_valid rises one clock after the selected enable was seen high,
// with ch_data holding the value sampled on that same edge.
module rs_decoder #(
  parameter int unsigned NUM_CH     = selftest_pkg::NUM_CHANNELS,
  parameter int unsigned NUM_RS     = selftest_pkg::NUM_RUNNING_SUMS,
  parameter int unsigned NUM_EN     = selftest_pkg::NUM_RS_ENABLES,
  parameter int unsigned CH_DW      = selftest_pkg::CHANNEL_DATA_WIDTH,
  parameter int unsigned RS_NUMBER  = selftest_pkg::RUNNING_SUM_NUMBER
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         test_enable,
  input  logic [NUM_CH-1:0][NUM_RS-1:0][CH_DW-1:0] rs_data,   // [channel][sum]
  input  logic [NUM_EN-1:0]            rs_enable,
  output logic [NUM_CH-1:0][CH_DW-1:0] ch_data,
  output logic                         ch_valid
);
  localparam int unsigned EN_INDEX = RS_NUMBER / 2;

  initial begin
    assert (RS_NUMBER < NUM_RS) else $error("RS_NUMBER out of range");
    assert (EN_INDEX < NUM_EN)  else $error("no enable for RS_NUMBER");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_data  <= '0;
      ch_valid <= 1'b0;
    end else begin
      ch_valid <= test_enable && rs_enable[EN_INDEX];
      if (test_enable && rs_enable[EN_INDEX])
        for (int c = 0; c < int'(NUM_CH); c++)
          ch_data[c] <= rs_data[c][RS_NUMBER];
    end
  end
endmodule
