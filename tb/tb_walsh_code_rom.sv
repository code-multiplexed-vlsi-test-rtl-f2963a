// tb_walsh_code_rom: checks the Walsh code library at 8 and 16 chips against
// a recursive Hadamard construction, and checks that rows 1..len-1 are
// balanced and pairwise orthogonal (agree in exactly half their chips).
module tb_walsh_code_rom;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0]  idx8;
  logic [7:0]  code8;
  logic [3:0]  idx16;
  logic [15:0] code16;

  walsh_code_rom #(.CODE_LEN(8))  dut8  (.code_idx(idx8),  .code(code8));
  walsh_code_rom #(.CODE_LEN(16)) dut16 (.code_idx(idx16), .code(code16));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  rows8 [8];
    logic [15:0] rows16 [16];
    for (int i = 0; i < 8; i++) begin
      idx8 = 3'(i);
      #1;
      rows8[i] = code8;
      check(code8 == walsh_ref(8, i) & 64'hFF,
            $sformatf("len 8 row %0d = %b, expected %b", i, code8, 8'(walsh_ref(8, i))));
    end
    for (int i = 0; i < 16; i++) begin
      idx16 = 4'(i);
      #1;
      rows16[i] = code16;
      check(code16 == 16'(walsh_ref(16, i)), $sformatf("len 16 row %0d", i));
    end
    // Fig. 5-style property check: balance and orthogonality.
    for (int i = 1; i < 8; i++) begin
      check($countones(rows8[i]) == 4, $sformatf("len 8 row %0d unbalanced", i));
      for (int j = i + 1; j < 8; j++)
        check($countones(rows8[i] ^ rows8[j]) == 4,
              $sformatf("len 8 rows %0d,%0d not orthogonal", i, j));
    end
    for (int i = 1; i < 16; i++) begin
      check($countones(rows16[i]) == 8, $sformatf("len 16 row %0d unbalanced", i));
      for (int j = i + 1; j < 16; j++)
        check($countones(rows16[i] ^ rows16[j]) == 8,
              $sformatf("len 16 rows %0d,%0d not orthogonal", i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
