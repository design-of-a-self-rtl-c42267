// Self-checking testbench of result_store (4 channels, 22-bit results).
// Random writes of quotients and error codes to the gain and phase
// registers are mirrored in a model here; after every write all eight
// buses are compared with it. Error codes must read 100..0 (channel counter
// overflow), 110..0 (reference counter overflow) and 111..0 (division by
// zero).
module tb_result_store;
  import selftest_pkg::*;
  localparam int N = 4, QW = 22;
  logic clk = 0, rst_n = 0, wr_gain = 0, wr_phase = 0, wr_error = 0;
  logic [1:0] addr = '0;
  err_kind_e err_kind = ERR_CHANNEL_OVERFLOW;
  logic [QW-1:0] quotient = '0;
  logic [N-1:0][QW-1:0] gain, phase;
  logic [QW-1:0] mg [N], mp [N];
  int checks = 0, failures = 0;

  result_store #(.N(N), .QW(QW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin mg[c] = '0; mp[c] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      logic [QW-1:0] w;
      @(negedge clk);
      addr = 2'($urandom); wr_gain = 1'($urandom); wr_phase = 1'($urandom);
      wr_error = ($urandom_range(0, 3) == 0);
      err_kind = err_kind_e'($urandom_range(0, 2));
      quotient = QW'($urandom);
      case (err_kind)
        ERR_CHANNEL_OVERFLOW:   w = 22'h200000;
        ERR_REFERENCE_OVERFLOW: w = 22'h300000;
        default:                w = 22'h380000;
      endcase
      if (!wr_error) w = quotient;
      if (wr_gain)  mg[addr] = w;
      if (wr_phase) mp[addr] = w;
      @(posedge clk); #1;
      wr_gain = 0; wr_phase = 0;
      for (int c = 0; c < N; c++) begin
        checks++;
        if (gain[c] != mg[c] || phase[c] != mp[c]) begin
          failures++;
          if (failures < 10) $display("ch %0d: %h/%h expected %h/%h", c, gain[c], phase[c], mg[c], mp[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
