// hold_counter: interval counter with a reset_hold input, used as the
// reference counter (period length) and as the channel counter (delay
// between reference and channel) of the phase measurement.
//
// The counter advances by one on each tick. A reset_hold pulse restarts the
// count and, at the same time, copies the value reached into the held
// output, so the last measured interval stays available long after the
// counter itself has been restarted. The count stops at its maximum, and a
// further tick raises the overflow flag, which is kept until the next
// reset_hold. The documented counter is reset asynchronously; here
// reset_hold is a synchronous input in the one test clock domain, and the
// count restarts at 1 when a tick coincides with reset_hold (that tick
// belongs to the new interval). Those are this design's choices.
//
// Timing: count and held outputs are registered; held_value is valid from
// the clock after reset_hold.
module hold_counter #(
  parameter int unsigned W = selftest_pkg::INTERNAL_DATA_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,        // synchronous restart, held value kept
  input  logic         tick,
  input  logic         reset_hold,
  output logic [W-1:0] count,
  output logic [W-1:0] held_value,
  output logic         overflow
);
  localparam logic [W-1:0] MAXV = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0; held_value <= '0; overflow <= 1'b0;
    end else if (clear) begin
      count <= '0; overflow <= 1'b0;
    end else if (reset_hold) begin
      held_value    <= count;
      count         <= tick ? W'(1) : '0;
      overflow      <= 1'b0;
    end else if (tick) begin
      if (count == MAXV) overflow <= 1'b1;
      else               count    <= count + 1'b1;
    end
  end
endmodule
