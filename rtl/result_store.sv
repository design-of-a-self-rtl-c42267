// result_store: the output registers of the self test (one gain and one
// phase bus per channel) together with the error code generator.
//
// A write puts either the divider's quotient or an error code into the gain
// or phase register of the addressed channel; which bus carries the code
// tells the channel and the measurement that failed. The codes are the
// documented ones, left-aligned on the result width:
//   "100..0" channel counter overflow
//   "110..0" reference counter overflow
//   "111..0" division by zero
// A register keeps its value until it is written again. Clearing all
// registers at reset is this design's choice.
//
// Timing: written on the clock edge on which the write strobe is high.
module result_store #(
  parameter int unsigned N  = selftest_pkg::NUM_CHANNELS,
  parameter int unsigned QW = selftest_pkg::INTERNAL_DATA_WIDTH + selftest_pkg::OUTPUT_DECIMALS,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [AW-1:0]          addr,
  input  logic                   wr_gain,
  input  logic                   wr_phase,
  input  logic                   wr_error,    // write the error code, not the quotient
  input  selftest_pkg::err_kind_e err_kind,
  input  logic [QW-1:0]          quotient,
  output logic [N-1:0][QW-1:0]   gain,
  output logic [N-1:0][QW-1:0]   phase
);
  import selftest_pkg::*;

  initial assert (QW >= 3) else $error("result width too small for error codes");

  logic [QW-1:0] code, wdata;

  always_comb begin
    unique case (err_kind)
      ERR_CHANNEL_OVERFLOW:   code = {3'b100, {(QW-3){1'b0}}};
      ERR_REFERENCE_OVERFLOW: code = {3'b110, {(QW-3){1'b0}}};
      ERR_DIVIDE_BY_ZERO:     code = {3'b111, {(QW-3){1'b0}}};
      default:                code = {3'b111, {(QW-3){1'b0}}};
    endcase
    wdata = wr_error ? code : quotient;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gain  <= '0;
      phase <= '0;
    end else begin
      if (wr_gain)  gain[addr]  <= wdata;
      if (wr_phase) phase[addr] <= wdata;
    end
  end
endmodule
