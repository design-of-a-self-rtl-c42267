// peak_to_peak: extracts the peak-to-peak amplitude of a slowly varying
// periodic signal by comparing each sample with the previous one.
//
// The block tracks the direction of the signal. When a rising signal turns
// down, the previous sample was a maximum and is stored. When a falling
// signal turns up, the previous sample was a minimum: the stored maximum
// minus that minimum is the peak-to-peak value, and p2p_valid pulses for one
// clock. A value is therefore produced once per signal period, always at
// the same point of the waveform (just after the minimum), which is also the
// time reference of the phase measurement. Equal consecutive samples keep
// the current direction. No value is produced until a maximum has been seen.
// The comparison scheme is the documented one; the direction flag, the
// initial "no maximum yet" state and registering the result are this
// design's choices.
//
// Interface: din (signed, W bits) is sampled when in_valid is high. p2p
// (unsigned, W bits) and p2p_valid appear on the clock edge that samples the
// first rising sample after a minimum.
module peak_to_peak #(
  parameter int unsigned W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic        [W-1:0] p2p,
  output logic                p2p_valid
);
  logic signed [W-1:0] prev, max_q;
  logic                have_prev, have_max, falling;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; max_q <= '0; have_prev <= 1'b0; have_max <= 1'b0;
      falling <= 1'b0; p2p <= '0; p2p_valid <= 1'b0;
    end else if (clear) begin
      have_prev <= 1'b0; have_max <= 1'b0; falling <= 1'b0; p2p_valid <= 1'b0;
    end else begin
      p2p_valid <= 1'b0;
      if (in_valid) begin
        prev      <= din;
        have_prev <= 1'b1;
        if (have_prev) begin
          if (!falling && din < prev) begin
            // previous sample was a maximum
            max_q    <= prev;
            have_max <= 1'b1;
            falling  <= 1'b1;
          end else if (falling && din > prev) begin
            // previous sample was a minimum
            falling <= 1'b0;
            if (have_max) begin
              p2p       <= W'(max_q - prev);
              p2p_valid <= 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
