// tb_cdma_encoder: applies random data bits and chip slots to encoders with
// Walsh codes 1..7 and checks each registered chip against data XOR code
// chip from an independently built Walsh table; idle or disabled encoders
// must send 0. Also reproduces the two-TG, 8-chip encoding example: data 1
// with code 1 and data 0 with code 2.
module tb_cdma_encoder;
  import tb_ref_pkg::*;

  localparam int unsigned L = 8;

  logic clk = 0, rst_n = 0;
  logic [6:0] data_bit = '0, data_valid = '0;
  logic [2:0] chip_idx = '0;
  logic chip_en = 0;
  logic [6:0] chip;

  int checks = 0, failures = 0;

  for (genvar c = 1; c < 8; c++) begin : g_enc
    cdma_encoder #(.CODE_LEN(L), .CODE_IDX(c)) dut (
      .clk(clk), .rst_n(rst_n), .data_bit(data_bit[c-1]), .data_valid(data_valid[c-1]),
      .chip_idx(chip_idx), .chip_en(chip_en), .chip(chip[c-1]));
  end

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
    logic [6:0] exp_chip;
    logic [7:0] sums [8];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      data_bit   = 7'($urandom);
      data_valid = 7'($urandom) | ((t < 1000) ? 7'h7F : 7'h00);
      chip_idx   = 3'($urandom);
      chip_en    = ($urandom_range(0, 9) != 0);
      for (int c = 1; c < 8; c++)
        exp_chip[c-1] = chip_en & data_valid[c-1] &
                        (data_bit[c-1] ^ walsh_ref(L, c)[chip_idx]);
      @(negedge clk);
      for (int c = 1; c < 8; c++)
        check(chip[c-1] == exp_chip[c-1], $sformatf("code %0d chip", c));
    end
    // Two-TG example: spread 1 with code 1 and 0 with code 2, add by position.
    data_valid = 7'b0000011;
    data_bit   = 7'b0000001;
    chip_en    = 1;
    for (int j = 0; j < 8; j++) begin
      chip_idx = 3'(j);
      @(negedge clk);
      sums[j] = 8'(chip[0]) + 8'(chip[1]);
    end
    // Code 1 = 01010101 (chip0 first) -> data 1 gives 1,0,1,0,...
    // Code 2 = 00110011 (chip0 first) -> data 0 gives 0,0,1,1,...
    check(sums[0] == 1 && sums[1] == 0 && sums[2] == 2 && sums[3] == 1 &&
          sums[4] == 1 && sums[5] == 0 && sums[6] == 2 && sums[7] == 1,
          "two-TG example sums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
