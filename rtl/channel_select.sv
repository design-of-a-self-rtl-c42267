// channel_select: the channel multiplexers of the measurement datapath.
//
// The control unit's channel address picks one channel's peak-to-peak value
// (a W-bit bus per channel) and, through a one-bit N-to-1 multiplexer driven
// by the same address lines, that channel's p2p_valid flag. The selected
// value is narrowed to the OW-bit operand width of the divider by
// saturation (values above the largest OW-bit number become all ones).
// The address-shared multiplexers follow the documented structure; the
// saturating width reduction is this design's choice.
//
// Purely combinational.
module channel_select #(
  parameter int unsigned N  = selftest_pkg::NUM_CHANNELS,
  parameter int unsigned W  = 22,
  parameter int unsigned OW = selftest_pkg::INTERNAL_DATA_WIDTH,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [AW-1:0]       addr,
  input  logic [N-1:0][W-1:0] p2p,
  input  logic [N-1:0]        p2p_valid,
  output logic [OW-1:0]       p2p_sel,
  output logic                p2p_valid_sel
);
  logic [W-1:0] picked;

  always_comb begin
    picked        = p2p[addr];
    p2p_valid_sel = p2p_valid[addr];
    if (W > OW && (picked >> OW) != '0) p2p_sel = '1;
    else                                p2p_sel = OW'(picked);
  end
endmodule
