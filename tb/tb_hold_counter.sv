// Self-checking testbench of hold_counter (W = 8, to reach overflow
// quickly). Intervals of random length, with ticks on random clocks, end
// with reset_hold; the held value must equal the number of ticks counted
// here since the previous reset_hold (a tick coinciding with reset_hold
// belongs to the next interval), the running count must restart, and an
// interval longer than 255 ticks must raise overflow (cleared by the next
// reset_hold) and hold the count at 255.
module tb_hold_counter;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, tick = 0, reset_hold = 0;
  logic [W-1:0] count, held_value;
  logic overflow;
  int checks = 0, failures = 0;

  hold_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ticks;   // ticks in the current interval

  task automatic interval(input int n_ticks, input bit tick_at_end);
    int sent = 0;
    while (sent < n_ticks) begin
      @(negedge clk);
      tick = ($urandom_range(0, 2) != 0);
      if (tick) sent++;
      @(posedge clk); #1;
      tick = 0;
      checks++;
      if (count != W'((ticks + sent > 255) ? 255 : ticks + sent)) begin
        failures++; if (failures < 10) $display("count %0d expected %0d", count, ticks + sent);
      end
      checks++;
      if (overflow != (ticks + sent > 255)) begin failures++; $display("overflow %0b after %0d ticks", overflow, ticks + sent); end
    end
    @(negedge clk);
    reset_hold = 1; tick = tick_at_end;
    @(posedge clk); #1;
    reset_hold = 0; tick = 0;
    checks++;
    if (held_value != W'((ticks + sent > 255) ? 255 : ticks + sent)) begin
      failures++; $display("held %0d expected %0d", held_value, ticks + sent);
    end
    checks++;
    if (count != W'(tick_at_end) || overflow) begin failures++; $display("count not restarted"); end
    ticks = tick_at_end;
  endtask

  initial begin
    ticks = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    interval(10, 0);
    interval(0, 1);
    interval(37, 1);
    interval(300, 0);     // overflow
    interval(255, 0);
    for (int i = 0; i < 100; i++) interval($urandom_range(0, 260), $urandom_range(0, 1));
    // held value survives many clocks without reset_hold
    repeat (50) @(posedge clk);
    checks++;
    if (held_value != W'((ticks > 255) ? 255 : 0) && held_value == 0 && ticks != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
