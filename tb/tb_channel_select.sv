// Self-checking testbench of channel_select with the top-level sizes
// (4 channels, 22-bit values, 16-bit operands): for every address and
// random values and flags, the selected value (saturated to 16 bits) and
// the selected p2p_valid flag are compared with values picked here.
module tb_channel_select;
  localparam int N = 4, W = 22, OW = 16;
  logic [1:0] addr;
  logic [N-1:0][W-1:0] p2p;
  logic [N-1:0] p2p_valid;
  logic [OW-1:0] p2p_sel;
  logic p2p_valid_sel;
  int checks = 0, failures = 0;

  channel_select #(.N(N), .W(W), .OW(OW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int exp_v;
      addr = 2'($urandom);
      for (int c = 0; c < N; c++)
        p2p[c] = ($urandom_range(0, 1)) ? W'($urandom_range(0, 65535)) : W'($urandom);
      p2p_valid = 4'($urandom);
      #1;
      exp_v = (p2p[addr] > 65535) ? 65535 : int'(p2p[addr]);
      checks++;
      if (p2p_sel != OW'(exp_v) || p2p_valid_sel != p2p_valid[addr]) begin
        failures++;
        if (failures < 10) $display("addr %0d: %0d/%0b expected %0d/%0b", addr, p2p_sel, p2p_valid_sel, exp_v, p2p_valid[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
