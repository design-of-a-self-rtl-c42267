// Self-checking testbench of fixed_point_divider at its default size
// (16-bit operands, 6 fractional bits). Random and corner operands are
// divided; each quotient is compared with floor(dividend * 2^6 / divisor)
// computed here, a zero divisor must raise div_by_zero, and the latency is
// checked: done must follow the load edge by DW+DEC edges (so that the
// store on the next edge completes 2 + DW + DEC = 24 clocks), with
// finishing high on the clock before.
module tb_fixed_point_divider;
  localparam int DW = 16, DEC = 6, QW = DW + DEC;
  logic clk = 0, rst_n = 0, start = 0;
  logic [DW-1:0] dividend = '0, divisor = '0;
  logic busy, finishing, done, div_by_zero;
  logic [QW-1:0] quotient;
  int checks = 0, failures = 0;

  fixed_point_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [DW-1:0] a, input logic [DW-1:0] b);
    int edges;
    logic [QW-1:0] exp_q;
    bit saw_finishing;
    @(negedge clk);
    dividend = a; divisor = b; start = 1;
    @(posedge clk);                 // load edge (edge 0)
    #1 start = 0; dividend = $urandom; divisor = $urandom;  // operands may change
    edges = 0; saw_finishing = 0;
    while (!done) begin
      if (finishing) saw_finishing = 1;
      @(posedge clk); #1;
      edges++;
      if (edges > 100) break;
    end
    checks++;
    if (edges != DW + DEC || !saw_finishing) begin
      failures++;
      $display("latency: done after %0d edges, expected %0d", edges, DW + DEC);
    end
    checks++;
    if (b == 0) begin
      if (!div_by_zero) begin failures++; $display("no div_by_zero for %0d/0", a); end
    end else begin
      exp_q = QW'((longint'(a) << DEC) / longint'(b));
      if (div_by_zero || quotient != exp_q) begin
        failures++;
        $display("%0d/%0d: got %0d expected %0d", a, b, quotient, exp_q);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (quotient != exp_q && b != 0) begin failures++; $display("quotient not held"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    divide(16'd100, 16'd50);
    divide(16'd1, 16'd3);
    divide(16'hFFFF, 16'd1);
    divide(16'hFFFF, 16'hFFFF);
    divide(16'd0, 16'd7);
    divide(16'd1234, 16'd0);
    divide(16'd2553, 16'd2553);
    divide(16'd700, 16'd2553);
    for (int i = 0; i < 300; i++) divide(DW'($urandom), DW'($urandom_range(1, 65535) >> $urandom_range(0, 15)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
