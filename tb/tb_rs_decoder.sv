// Self-checking testbench of rs_decoder at the default sizes (4 channels,
// 12 sums of 40 bits, 6 enables, running sum 7). Random buses and enables
// are applied; ch_valid must follow enable 3 (= 7/2) by one clock while
// test_enable is high, and ch_data must carry sum 7 of every channel as it
// was when that enable was sampled, and keep it otherwise.
module tb_rs_decoder;
  logic clk = 0, rst_n = 0, test_enable = 0;
  logic [3:0][11:0][39:0] rs_data;
  logic [5:0] rs_enable = '0;
  logic [3:0][39:0] ch_data, exp_data;
  logic ch_valid;
  int checks = 0, failures = 0;

  rs_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_data = '0;
    rs_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit exp_valid;
      @(negedge clk);
      test_enable = (i > 20) && ($urandom_range(0, 9) != 0);
      rs_enable = 6'($urandom);
      for (int c = 0; c < 4; c++)
        for (int s = 0; s < 12; s++) rs_data[c][s] = {8'($urandom), 32'($urandom)};
      exp_valid = test_enable && rs_enable[3];
      if (exp_valid) for (int c = 0; c < 4; c++) exp_data[c] = rs_data[c][7];
      @(posedge clk); #1;
      checks++;
      if (ch_valid != exp_valid || ch_data != exp_data) begin
        failures++;
        if (failures < 10) $display("cycle %0d: valid %0b data %h expected %0b %h", i, ch_valid, ch_data, exp_valid, exp_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
