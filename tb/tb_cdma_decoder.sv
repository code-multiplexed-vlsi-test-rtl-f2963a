// tb_cdma_decoder: the testbench itself spreads random bits of up to five
// TGs with Walsh codes 1..5 (reference table), adds the chips and feeds the
// sums to five decoders. Each decoder must recover its own TG's bit one clock
// after the last chip, and must flag a symbol in which its TG was silent
// (bit_valid low) while other TGs keep transmitting.
module tb_cdma_decoder;
  import tb_ref_pkg::*;

  localparam int unsigned N = 5, L = 8;

  logic clk = 0, rst_n = 0;
  logic [2:0] sum = '0, sum_idx = '0;
  logic sum_valid = 0;
  logic [N-1:0] bit_out, bit_valid, sym_done;

  int checks = 0, failures = 0;
  int idle_symbols = 0;

  for (genvar k = 0; k < N; k++) begin : g_dec
    cdma_decoder #(.N_IN(N), .CODE_LEN(L), .CODE_IDX(k + 1)) dut (
      .clk(clk), .rst_n(rst_n), .sum(sum), .sum_idx(sum_idx), .sum_valid(sum_valid),
      .bit_out(bit_out[k]), .bit_valid(bit_valid[k]), .sym_done(sym_done[k]));
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] data, act;
    int s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int sym = 0; sym < 3000; sym++) begin
      data = N'($urandom);
      act  = (sym < 500) ? '1 : N'($urandom);
      for (int j = 0; j < L; j++) begin
        s = 0;
        for (int k = 0; k < N; k++)
          if (act[k]) s += int'(data[k] ^ walsh_ref(L, k + 1)[j]);
        sum = 3'(s); sum_idx = 3'(j); sum_valid = 1;
        // Occasional bus bubbles inside a symbol.
        if (sym % 7 == 3 && j == 4) begin
          sum_valid = 0;
          @(negedge clk);
          check(sym_done == '0, "no sym_done on bubble");
          sum_valid = 1;
        end
        @(negedge clk);
        if (j != L - 1) check(sym_done == '0, "sym_done early");
      end
      sum_valid = 0;
      check(sym_done == '1, "sym_done after last chip");
      for (int k = 0; k < N; k++) begin
        check(bit_valid[k] == act[k], $sformatf("sym %0d core %0d valid", sym, k));
        if (act[k]) check(bit_out[k] == data[k], $sformatf("sym %0d core %0d bit", sym, k));
        else idle_symbols++;
      end
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    check(idle_symbols > 0, "idle symbols exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
