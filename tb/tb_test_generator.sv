// tb_test_generator: drives the test generator in both modes and compares
// every serial bit with a reference model. Covers: LFSR and counter mode,
// reconfiguration between sessions, a configuration attempt while active
// (must be ignored), a zero pattern count, and gaps between sym_adv pulses.
module tb_test_generator;
  import cdma_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned W = 9;

  logic clk = 0, rst_n = 0;
  logic cfg_load = 0, start = 0, sym_adv = 0;
  tg_mode_e cfg_mode = TG_LFSR;
  logic [W-1:0] cfg_seed = '0, cfg_taps = '0;
  logic [NPAT_W-1:0] cfg_npat = '0;
  logic bit_out, active;
  logic [NPAT_W-1:0] pat_idx;
  logic [$clog2(W+1)-1:0] bit_idx;

  int checks = 0, failures = 0;

  test_generator #(.PAT_W(W)) dut (.*);

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

  task automatic configure(tg_mode_e m, logic [W-1:0] seed, logic [W-1:0] taps, int n);
    @(negedge clk);
    cfg_mode = m; cfg_seed = seed; cfg_taps = taps; cfg_npat = NPAT_W'(n);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
  endtask

  // Runs one session and checks every bit against the model.
  task automatic run_session(tg_mode_e m, logic [W-1:0] seed, logic [W-1:0] taps, int n,
                             bit gaps);
    logic [31:0] pat;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(active == (n != 0), "active after start");
    pat = 32'(seed);
    for (int p = 0; p < n; p++) begin
      for (int b = 0; b < W; b++) begin
        check(active, $sformatf("active at pattern %0d bit %0d", p, b));
        check(bit_out == pat[b], $sformatf("bit p%0d b%0d got %0b exp %0b", p, b, bit_out, pat[b]));
        check(pat_idx == NPAT_W'(p) && bit_idx == 4'(b), "position");
        if (p == 0 && b == 3) begin
          // A configuration attempt during a session must be ignored.
          cfg_seed = ~seed; cfg_npat = 1; cfg_load = 1;
          @(negedge clk);
          cfg_load = 0;
        end
        if (gaps && ($urandom_range(0, 2) == 0)) repeat ($urandom_range(1, 3)) @(negedge clk);
        sym_adv = 1;
        @(negedge clk);
        sym_adv = 0;
      end
      pat = (m == TG_LFSR) ? lfsr_ref(pat, 32'(taps), W) : count_ref(pat, W);
    end
    check(!active, "inactive after last pattern");
    // Extra advances while idle change nothing.
    sym_adv = 1;
    @(negedge clk);
    sym_adv = 0;
    check(!active, "stays inactive");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!active, "idle after reset");
    // LFSR x^9 + x^5 + 1 style taps (Galois).
    configure(TG_LFSR, 9'h1A5, 9'h110, 40);
    run_session(TG_LFSR, 9'h1A5, 9'h110, 40, 0);
    // Reconfigure: counter mode, different seed, with gaps.
    configure(TG_COUNT, 9'h1FD, '0, 7);
    run_session(TG_COUNT, 9'h1FD, '0, 7, 1);
    // Zero patterns: never becomes active.
    configure(TG_LFSR, 9'h001, 9'h110, 0);
    run_session(TG_LFSR, 9'h001, 9'h110, 0, 0);
    // Random LFSR sessions.
    for (int i = 0; i < 5; i++) begin
      logic [W-1:0] s, t;
      int n;
      s = W'($urandom); t = W'($urandom) | 9'h100; n = $urandom_range(1, 12);
      configure(TG_LFSR, s, t, n);
      run_session(TG_LFSR, s, t, n, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
