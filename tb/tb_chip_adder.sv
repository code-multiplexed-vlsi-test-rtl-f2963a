// tb_chip_adder: random chip vectors into the 5-input bus adder; the sum,
// chip index and valid on the bus must equal the population count, index and
// valid of the previous clock (one-clock latency). Also checks a 7-input
// adder, the largest a set of 8-chip codes can feed.
module tb_chip_adder;
  logic clk = 0, rst_n = 0;
  logic [4:0] chips5 = '0;
  logic [6:0] chips7 = '0;
  logic [2:0] idx = '0;
  logic valid = 0;
  logic [2:0] sum5, sum7, sidx5, sidx7;
  logic sval5, sval7;

  int checks = 0, failures = 0;

  chip_adder #(.N_IN(5), .CODE_LEN(8)) dut5 (
    .clk(clk), .rst_n(rst_n), .chips(chips5), .chip_idx(idx), .chip_valid(valid),
    .sum(sum5), .sum_idx(sidx5), .sum_valid(sval5));
  chip_adder #(.N_IN(7), .CODE_LEN(8)) dut7 (
    .clk(clk), .rst_n(rst_n), .chips(chips7), .chip_idx(idx), .chip_valid(valid),
    .sum(sum7), .sum_idx(sidx7), .sum_valid(sval7));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e5, e7;
    logic [2:0] ei;
    logic ev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      chips5 = 5'($urandom);
      chips7 = 7'($urandom);
      if (t % 100 == 7) chips7 = 7'h7F;
      idx = 3'($urandom);
      valid = ($urandom_range(0, 7) != 0);
      e5 = 0; e7 = 0;
      for (int i = 0; i < 5; i++) e5 += chips5[i];
      for (int i = 0; i < 7; i++) e7 += chips7[i];
      ei = idx; ev = valid;
      @(negedge clk);
      check(sval5 == ev && sval7 == ev, "valid");
      check(sidx5 == ei && sidx7 == ei, "index");
      check(!ev || (32'(sum5) == e5), $sformatf("sum5 %0d exp %0d", sum5, e5));
      check(!ev || (32'(sum7) == e7), $sformatf("sum7 %0d exp %0d", sum7, e7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
