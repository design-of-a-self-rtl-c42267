// fixed_point_divider: small shift-and-subtract (restoring) divider that
// returns dividend / divisor as an unsigned fixed-point number with DEC
// fractional bits. It computes both the gain (peak-to-peak ratio) and the
// phase (delay count over period count).
//
// Structure, as documented: a partial-dividend (remainder) shift register, a
// quotient shift register and one subtractor whose second operand is the
// divisor, held in a register for the whole operation. Every clock both
// registers shift by one bit. The subtractor's borrow tells whether the
// divisor fits: with no borrow the difference replaces the upper part of
// the partial dividend and a '1' enters the quotient; with a borrow the
// difference is dropped, the partial dividend only shifts, and a '0' enters
// the quotient. After the DW integer steps the dividend is exhausted and DEC
// further steps shift in zeros (multiplying by two) to produce the
// fractional bits.
//
// Latency (fixed): 1 load + DW + DEC steps + 1 store = 2 + DW + DEC clocks,
// 24 with the default 16-bit operands and 6 decimals. With start sampled on
// clock edge 0 (operands loaded), the steps run on edges 1 .. DW+DEC.
// finishing is high during the clock before the last step, done is a
// one-clock pulse after it, while quotient (the quotient register) holds
// the result; the user stores it on edge DW+DEC+1. The quotient register
// keeps its value until the next start. A zero divisor raises div_by_zero
// from the load edge until the next start; the steps still run, so the
// latency does not change. start while busy is ignored.
module fixed_point_divider #(
  parameter int unsigned DW  = selftest_pkg::INTERNAL_DATA_WIDTH,
  parameter int unsigned DEC = selftest_pkg::OUTPUT_DECIMALS,
  localparam int unsigned QW = DW + DEC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          finishing,
  output logic          done,
  output logic [QW-1:0] quotient,
  output logic          div_by_zero
);
  localparam int unsigned CNT_W = $clog2(QW + 1);

  logic [DW-1:0]    divisor_q;       // locked second operand
  logic [DW-1:0]    rem_q;           // upper part: partial remainder
  logic [DW-1:0]    dvd_q;           // lower part: dividend bits still to enter
  logic [QW-1:0]    quo_q;           // quotient shift register
  logic [CNT_W-1:0] step_q;
  logic             zero_q;

  // one step: shift the next dividend bit in, try the subtraction
  logic [DW:0]   trial;              // remainder after shifting, DW+1 bits
  logic [DW+1:0] diff;               // trial - divisor with borrow in MSB
  logic          borrow;

  always_comb begin
    trial  = {rem_q, dvd_q[DW-1]};
    diff   = {1'b0, trial} - {2'b00, divisor_q};
    borrow = diff[DW+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      divisor_q <= '0; rem_q <= '0; dvd_q <= '0; quo_q <= '0; step_q <= '0;
      zero_q <= 1'b0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          divisor_q <= divisor;
          dvd_q     <= dividend;
          rem_q     <= '0;
          quo_q     <= '0;
          step_q    <= '0;
          zero_q    <= (divisor == '0);
          busy      <= 1'b1;
        end
      end else begin
        // both shift registers move every clock
        dvd_q  <= {dvd_q[DW-2:0], 1'b0};
        quo_q  <= {quo_q[QW-2:0], ~borrow};
        rem_q  <= borrow ? trial[DW-1:0] : diff[DW-1:0];
        step_q <= step_q + 1'b1;
        if (finishing) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign finishing   = busy && (step_q == CNT_W'(QW - 1));
  assign quotient    = quo_q;
  assign div_by_zero = zero_q;

  // the step counter never runs past the last step
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 busy |-> step_q < CNT_W'(QW))
    else $error("divider step counter overrun");
endmodule
